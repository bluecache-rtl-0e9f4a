// flash_log_manager: the log-structured flash store manager.
//
// Objects leaving the DRAM store are appended to one of two 1 MB write
// buffers held in DRAM (WB_BASE).  When the open buffer cannot take the next
// object (or on flush_req) it is sealed and becomes the next logical chunk of
// the log; the other buffer opens for the chunk after it.  A sealed buffer is
// flushed as PAGES_PER_CHUNK page writes striped over all chips: page p of a
// chunk goes to bus p mod NUM_BUS, chip (p / NUM_BUS) mod CHIPS_PER_BUS, so
// each chip gets PPC = PAGES_PER_CHUNK/(NUM_BUS*CHIPS_PER_BUS) pages of the
// chunk (one with the default geometry).  Before the first chunk of an erase
// block is written, that block is erased on every chip; a bad erase enters the
// bad block list, which supplies a spare block that is erased in turn.  The
// chunk counter wraps after NUM_CHUNKS: the oldest data is then erased and
// overwritten, which is the whole garbage collection.
//
// Flash byte address of an object = chunk * 1 MB + line offset * 64.  Reads
// of data still in a write buffer are redirected by the caller to DRAM using
// the lk_* lookup port; page reads of flushed chunks are translated here
// (including the bad block remap) and issued with the caller's tag.
// Contract: the caller writes all lines of an appended object into the
// returned DRAM lines before it asks for the next append or a flush.
//
// Follows the original: DRAM write buffers flushed as chunks striped over all
// chips, wrap-around erase-and-overwrite as the only garbage collection, and
// the bad block list. Own choices: two 1 MB buffers, 8 KB pages, 8 chips per
// bus, 256 pages per block, and erase just before writing rather than in the
// background.
module flash_log_manager
  import bc_pkg::*;
#(
  parameter dram_addr_t WB_BASE    = dram_addr_t'(1) << 24,
  parameter int         LOG_BLOCKS = 4032,
  parameter int         BBL_ENTRIES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // append an object of app_lines lines
  input  logic              app_valid,
  output logic              app_ready,
  input  logic [14:0]       app_lines,
  output logic [FLASH_AW-1:0] app_flash_addr,
  output dram_addr_t        app_dram_addr,
  input  logic              flush_req,
  // write-buffer lookup for reads
  input  logic [19:0]       lk_chunk,
  output logic              lk_hit,
  output dram_addr_t        lk_dram_base,
  // page reads of flushed chunks
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [19:0]       rd_chunk,
  input  logic [6:0]        rd_page,
  input  logic [FTAG_W-1:0] rd_tag,
  // flash controller
  output logic              fcmd_valid,
  input  logic              fcmd_ready,
  output flash_cmd_t        fcmd,
  output logic              fwdata_valid,
  input  logic              fwdata_ready,
  output line_t             fwdata,
  input  logic              fack_valid,
  input  flash_erase_ack_t  fack,
  // DRAM (write-buffer reads during flush)
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_resp_valid,
  input  line_t             dram_resp_data,
  // status
  output logic [31:0]       chunks_flushed,
  output logic [31:0]       blocks_erased,
  output logic [31:0]       log_wraps,
  output logic [$clog2(BBL_ENTRIES+1)-1:0] bad_blocks
);
  localparam int NCHIPS           = NUM_BUS * CHIPS_PER_BUS;
  localparam int PPC              = PAGES_PER_CHUNK / NCHIPS;
  localparam int CHUNKS_PER_BLOCK = PAGES_PER_BLOCK / PPC;
  localparam int NUM_CHUNKS       = LOG_BLOCKS * CHUNKS_PER_BLOCK;
  localparam int BW               = $clog2(NUM_BUS);
  localparam int CHW              = $clog2(CHIPS_PER_BUS);

  typedef enum logic [1:0] {B_FREE, B_OPEN, B_SEALED} buf_state_e;
  buf_state_e    bstate [2];
  logic [19:0]   bchunk [2];
  logic          cur;            // open buffer
  logic [14:0]   off;            // next free line in the open buffer
  logic [19:0]   next_chunk;
  logic          fl_first;       // which buffer was sealed first

  // ---------------- append
  wire fits      = ({1'b0, off} + {1'b0, app_lines}) <= 16'(CHUNK_LINES);
  assign app_ready      = (bstate[cur] == B_OPEN) && fits;
  assign app_flash_addr = {bchunk[cur], 20'(off) << 6};
  assign app_dram_addr  = WB_BASE + (dram_addr_t'(cur) << 14) + dram_addr_t'(off);
  wire need_seal = (bstate[cur] == B_OPEN) && (off != 0) &&
                   ((app_valid && !fits) || flush_req) && (bstate[!cur] == B_FREE);

  always_comb begin
    lk_hit = 1'b0; lk_dram_base = WB_BASE;
    for (int b = 0; b < 2; b++)
      if (bstate[b] != B_FREE && bchunk[b] == lk_chunk) begin
        lk_hit = 1'b1; lk_dram_base = WB_BASE + (dram_addr_t'(b) << 14);
      end
  end

  // ---------------- flush engine
  typedef enum logic [2:0] {FS_IDLE, FS_ERASE, FS_WCMD, FS_WDATA, FS_DONE} fstate_e;
  fstate_e         fst;
  logic            fbuf;
  logic [19:0]     fchunk;
  logic [7:0]      eidx, eacks;       // erase commands issued / good acks
  logic [7:0]      page;              // page of the chunk being written
  logic [7:0]      lrd, lsent;        // lines read from DRAM / sent to flash
  logic [BLOCK_W-1:0] eblk;

  // bad-erase retries
  typedef struct packed { logic [6:0] chip; logic [BLOCK_W-1:0] pblk; } retry_t;
  logic   rq_in_valid, rq_in_ready, rq_out_valid, rq_out_ready;
  retry_t rq_in, rq_out;
  logic [$clog2(NCHIPS+1)-1:0] rq_count;
  sync_fifo #(.T(retry_t), .DEPTH(NCHIPS)) u_retry (
    .clk, .rst_n, .in_valid(rq_in_valid), .in_ready(rq_in_ready), .in_data(rq_in),
    .out_valid(rq_out_valid), .out_ready(rq_out_ready), .out_data(rq_out), .count(rq_count));

  // bad block list
  logic [6:0]         lk_chip_s, ins_chip;
  logic [BLOCK_W-1:0] lk_blk_s, lk_phys, ins_phys;
  logic               ins_valid, ins_ok;
  bad_block_list #(.ENTRIES(BBL_ENTRIES), .LOG_BLOCKS(LOG_BLOCKS), .SPARES(64)) u_bbl (
    .clk, .rst_n, .lk_chip(lk_chip_s), .lk_block(lk_blk_s), .lk_phys,
    .ins_valid, .ins_chip, .ins_block(eblk), .ins_phys, .ins_ok, .num_bad(bad_blocks));

  assign ins_valid   = fack_valid && fack.bad;
  assign ins_chip    = {fack.bus, fack.chip};
  assign rq_in_valid = fack_valid && fack.bad && ins_ok;
  assign rq_in       = '{chip: {fack.bus, fack.chip}, pblk: ins_phys};

  // page location of (chunk, page)
  function automatic logic [31:0] chip_page(input logic [19:0] ch, input logic [6:0] p);
    return 32'(ch) * PPC + 32'(p) / NCHIPS;
  endfunction

  wire [31:0] wr_cp = chip_page(fchunk, page[6:0]);
  wire [31:0] rd_cp = chip_page(rd_chunk, rd_page);
  wire [6:0]  wr_chip = 7'(page[6:0] % NCHIPS);
  wire [6:0]  rd_chipid = 7'(rd_page % NCHIPS);

  // command mux: erase retry > erase > page write > page read
  logic sel_retry, sel_erase, sel_write, sel_read;
  always_comb begin
    sel_retry = (fst == FS_ERASE) && rq_out_valid;
    sel_erase = (fst == FS_ERASE) && !sel_retry && (eidx < 8'(NCHIPS));
    sel_write = (fst == FS_WCMD);
    sel_read  = !sel_retry && !sel_erase && !sel_write && rd_valid;
    fcmd = '0;
    lk_chip_s = '0; lk_blk_s = '0;
    if (sel_retry) begin
      fcmd.op = F_ERASE; fcmd.bus = BW'(rq_out.chip % NUM_BUS); fcmd.chip = CHW'(rq_out.chip / NUM_BUS);
      fcmd.block = rq_out.pblk;
    end else if (sel_erase) begin
      lk_chip_s = 7'(eidx); lk_blk_s = eblk;
      fcmd.op = F_ERASE; fcmd.bus = BW'(eidx % NUM_BUS); fcmd.chip = CHW'((32'(eidx) / NUM_BUS) % CHIPS_PER_BUS);
      fcmd.block = lk_phys;
    end else if (sel_write) begin
      lk_chip_s = wr_chip; lk_blk_s = BLOCK_W'(wr_cp / PAGES_PER_BLOCK);
      fcmd.op = F_WRITE; fcmd.bus = BW'(wr_chip % NUM_BUS); fcmd.chip = CHW'(wr_chip / NUM_BUS);
      fcmd.block = lk_phys; fcmd.page = 8'(wr_cp % PAGES_PER_BLOCK);
    end else begin
      lk_chip_s = rd_chipid; lk_blk_s = BLOCK_W'(rd_cp / PAGES_PER_BLOCK);
      fcmd.op = F_READ; fcmd.bus = BW'(rd_chipid % NUM_BUS); fcmd.chip = CHW'(rd_chipid / NUM_BUS);
      fcmd.block = lk_phys; fcmd.page = 8'(rd_cp % PAGES_PER_BLOCK); fcmd.tag = rd_tag;
    end
  end
  assign fcmd_valid   = sel_retry || sel_erase || sel_write || sel_read;
  assign rd_ready     = sel_read && fcmd_ready;
  assign rq_out_ready = sel_retry && fcmd_ready;

  // write data path: DRAM read-ahead into a small FIFO
  logic       df_out_valid, df_in_ready;
  logic [4:0] df_count;
  logic [4:0] outstanding;
  sync_fifo #(.T(line_t), .DEPTH(16)) u_data (
    .clk, .rst_n, .in_valid(dram_resp_valid), .in_ready(df_in_ready), .in_data(dram_resp_data),
    .out_valid(df_out_valid), .out_ready(fwdata_ready && fst == FS_WDATA), .out_data(fwdata), .count(df_count));
  assign fwdata_valid   = df_out_valid && (fst == FS_WDATA);
  assign dram_req_valid = (fst == FS_WDATA) && (lrd < 8'(PAGE_LINES)) && ((df_count + outstanding) < 5'd16);
  always_comb begin
    dram_req       = '0;
    dram_req.write = 1'b0;
    dram_req.addr  = WB_BASE + (dram_addr_t'(fbuf) << 14) + (dram_addr_t'(page[6:0]) << 7) + dram_addr_t'(lrd);
  end

  // buffer picked for the next flush
  wire sb = (bstate[!fl_first] == B_SEALED && bstate[fl_first] == B_SEALED) ? !fl_first : fl_first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate[0] <= B_OPEN; bstate[1] <= B_FREE; bchunk[0] <= '0; bchunk[1] <= '0;
      cur <= 1'b0; off <= '0; next_chunk <= 20'd1; fl_first <= 1'b0;
      fst <= FS_IDLE; fbuf <= 1'b0; fchunk <= '0; eidx <= '0; eacks <= '0; page <= '0;
      lrd <= '0; lsent <= '0; eblk <= '0; outstanding <= '0;
      chunks_flushed <= '0; blocks_erased <= '0; log_wraps <= '0;
    end else begin
      // append / seal
      if (app_valid && app_ready) off <= off + app_lines;
      if (need_seal) begin
        bstate[cur]  <= B_SEALED;
        fl_first     <= cur;
        bstate[!cur] <= B_OPEN;
        bchunk[!cur] <= next_chunk;
        next_chunk   <= (next_chunk == 20'(NUM_CHUNKS-1)) ? '0 : next_chunk + 1'b1;
        if (next_chunk == 20'(NUM_CHUNKS-1)) log_wraps <= log_wraps + 1'b1;
        cur <= !cur;
        off <= '0;
      end
      // outstanding DRAM reads
      outstanding <= outstanding + ((dram_req_valid && dram_req_ready) ? 5'd1 : 5'd0)
                                 - (dram_resp_valid ? 5'd1 : 5'd0);
      // flush engine
      case (fst)
        FS_IDLE: begin
          if (bstate[sb] == B_SEALED) begin
            fbuf   <= sb;
            fchunk <= bchunk[sb];
            page   <= '0;
            eidx   <= '0;
            eacks  <= '0;
            eblk   <= BLOCK_W'((32'(bchunk[sb]) * PPC) / PAGES_PER_BLOCK);
            fst    <= ((bchunk[sb] % 20'(CHUNKS_PER_BLOCK)) == 0) ? FS_ERASE : FS_WCMD;
          end
        end
        FS_ERASE: begin
          if (sel_erase && fcmd_ready) eidx <= eidx + 1'b1;
          if (fack_valid && (!fack.bad || !ins_ok)) begin
            eacks <= eacks + 1'b1;
            if (eacks == 8'(NCHIPS-1)) begin
              fst <= FS_WCMD;
              blocks_erased <= blocks_erased + 1'b1;
            end
          end
        end
        FS_WCMD: if (fcmd_ready) begin
          lrd <= '0; lsent <= '0;
          fst <= FS_WDATA;
        end
        FS_WDATA: begin
          if (dram_req_valid && dram_req_ready) lrd <= lrd + 1'b1;
          if (fwdata_valid && fwdata_ready) begin
            lsent <= lsent + 1'b1;
            if (lsent == 8'(PAGE_LINES-1)) begin
              page <= page + 1'b1;
              fst  <= (page == 8'(PAGES_PER_CHUNK-1)) ? FS_DONE : FS_WCMD;
            end
          end
        end
        FS_DONE: begin
          bstate[fbuf]   <= B_FREE;
          chunks_flushed <= chunks_flushed + 1'b1;
          fst            <= FS_IDLE;
        end
        default: fst <= FS_IDLE;
      endcase
    end
  end
endmodule
