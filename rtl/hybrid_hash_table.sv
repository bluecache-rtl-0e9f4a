// hybrid_hash_table: the hybrid-memory hash table of a BlueCache node.
//
// It executes SET, GET and DELETE on key-value objects whose index lives in
// the DRAM-resident 4-way index table (index_table) and whose data lives
// either in the slab-structured DRAM store (slab_allocator) or in the
// log-structured flash store (flash_log_manager + read_reorder_buffer).
//
//  SET    : a slab slot for {header line, key, value} is allocated.  If the
//           class is full, the pseudo-LRU victim slot is first appended to
//           the flash log (copied line by line into the open write buffer)
//           and its index entry is re-pointed to the flash address through
//           the back-trace information in the victim's header line.  Then the
//           header line and the object lines are written, and the index entry
//           {now, hashed key, key length, value length, DRAM pointer} is
//           inserted.
//  GET    : index lookup; on a hit the object lines are read from the DRAM
//           slot, from a flash write buffer still in DRAM, or as flash pages
//           through the reorder buffer, and returned as a word stream.
//  DELETE : only the index entry is removed; the data is left as stale.
//
// Interface: a command (ht_cmd_t) is accepted in C_IDLE; for SET the object
// (key bytes then value bytes, ceil((klen+vlen)/8) words) follows on in_*.
// Every command yields one ht_resp_t; a GET hit is followed on out_* by the
// stored object (key then value, ceil((klen+vlen)/8) words, out_last on the
// final word).  Commands are processed one at a time.  All DRAM traffic is
// merged onto the node's single DRAM port by a round-robin arbiter.
// Objects are laid out line-aligned: slot/flash line 0 is the slot header,
// object byte i sits in line 1 + i/64.  A victim larger than one 1 MB flash
// chunk is dropped instead of moved (its key then misses).
module hybrid_hash_table
  import bc_pkg::*;
#(
  parameter int INDEX_BITS   = 24,
  parameter int NUM_CLASSES  = 15,
  parameter int REGION_BITS  = 22,
  parameter int LOG_BLOCKS   = 4032,
  parameter int ROB_TAGS     = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  ht_cmd_t           cmd,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [63:0]       in_word,
  output logic              resp_valid,
  input  logic              resp_ready,
  output ht_resp_t          resp,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [63:0]       out_word,
  output logic              out_last,
  input  logic              flush_req,
  // DRAM
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_resp_valid,
  input  line_t             dram_resp_data,
  // flash controller
  output logic              fcmd_valid,
  input  logic              fcmd_ready,
  output flash_cmd_t        fcmd,
  output logic              fwdata_valid,
  input  logic              fwdata_ready,
  output line_t             fwdata,
  input  logic              frdata_valid,
  input  flash_rdata_t      frdata,
  input  logic              fack_valid,
  input  flash_erase_ack_t  fack,
  // event counters
  output logic [31:0]       n_evictions,
  output logic [31:0]       n_flash_reads,
  output logic [31:0]       n_wb_reads,
  output logic [31:0]       n_chunks_flushed,
  output logic [31:0]       n_blocks_erased
);
  // ---------------- timestamp
  logic [TS_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= 32'd1; else now <= now + 1'b1;

  // ---------------- DRAM arbiter: 0 index, 1 slab, 2 mover, 3 flash flush
  logic [3:0] a_valid, a_ready, a_rvalid;
  dram_req_t  a_req [4];
  line_t      a_rdata;
  dram_arbiter #(.N(4)) u_arb (
    .clk, .rst_n, .c_req_valid(a_valid), .c_req_ready(a_ready), .c_req(a_req),
    .c_resp_valid(a_rvalid), .c_resp_data(a_rdata),
    .m_req_valid(dram_req_valid), .m_req_ready(dram_req_ready), .m_req(dram_req),
    .m_resp_valid(dram_resp_valid), .m_resp_data(dram_resp_data));

  // ---------------- index table
  logic         it_cmd_valid, it_cmd_ready, it_resp_valid, it_resp_hit, it_old_valid;
  logic [1:0]   it_op;
  logic [31:0]  it_jhash;
  index_entry_t it_entry, it_resp_entry;
  logic [PTR_W-1:0] it_old_ptr;
  index_table #(.INDEX_BITS(INDEX_BITS)) u_index (
    .clk, .rst_n, .now,
    .cmd_valid(it_cmd_valid), .cmd_ready(it_cmd_ready), .cmd_op(it_op), .cmd_jhash(it_jhash),
    .cmd_entry(it_entry), .cmd_old_ptr(it_old_ptr),
    .resp_valid(it_resp_valid), .resp_ready(1'b1), .resp_hit(it_resp_hit), .resp_entry(it_resp_entry),
    .resp_old_valid(it_old_valid),
    .dram_req_valid(a_valid[0]), .dram_req_ready(a_ready[0]), .dram_req(a_req[0]),
    .dram_resp_valid(a_rvalid[0]), .dram_resp_data(a_rdata));

  // ---------------- slab allocator
  logic        sa_req_valid, sa_req_ready, sa_resp_valid, sa_evict, sa_fit;
  logic [17:0] sa_lines;
  dram_addr_t  sa_addr;
  logic [4:0]  sa_class;
  slot_hdr_t   sa_victim;
  slab_allocator #(.NUM_CLASSES(NUM_CLASSES), .REGION_BITS(REGION_BITS)) u_slab (
    .clk, .rst_n, .req_valid(sa_req_valid), .req_ready(sa_req_ready), .req_lines(sa_lines),
    .resp_valid(sa_resp_valid), .resp_ready(1'b1), .resp_addr(sa_addr), .resp_class(sa_class),
    .resp_evict(sa_evict), .resp_victim(sa_victim), .resp_fit(sa_fit),
    .dram_req_valid(a_valid[1]), .dram_req_ready(a_ready[1]), .dram_req(a_req[1]),
    .dram_resp_valid(a_rvalid[1]), .dram_resp_data(a_rdata));

  // ---------------- flash store
  logic        fl_app_valid, fl_app_ready, fl_lk_hit, fl_rd_valid, fl_rd_ready;
  logic [14:0] fl_app_lines;
  logic [FLASH_AW-1:0] fl_app_faddr;
  dram_addr_t  fl_app_daddr, fl_lk_base;
  logic [19:0] fl_lk_chunk;
  logic [6:0]  fl_rd_page;
  logic [FTAG_W-1:0] rob_tag;
  logic [31:0] fl_wraps;
  logic [6:0]  fl_bad;
  flash_log_manager #(.LOG_BLOCKS(LOG_BLOCKS)) u_flash (
    .clk, .rst_n,
    .app_valid(fl_app_valid), .app_ready(fl_app_ready), .app_lines(fl_app_lines),
    .app_flash_addr(fl_app_faddr), .app_dram_addr(fl_app_daddr), .flush_req,
    .lk_chunk(fl_lk_chunk), .lk_hit(fl_lk_hit), .lk_dram_base(fl_lk_base),
    .rd_valid(fl_rd_valid), .rd_ready(fl_rd_ready), .rd_chunk(fl_lk_chunk), .rd_page(fl_rd_page),
    .rd_tag(rob_tag),
    .fcmd_valid, .fcmd_ready, .fcmd, .fwdata_valid, .fwdata_ready, .fwdata, .fack_valid, .fack,
    .dram_req_valid(a_valid[3]), .dram_req_ready(a_ready[3]), .dram_req(a_req[3]),
    .dram_resp_valid(a_rvalid[3]), .dram_resp_data(a_rdata),
    .chunks_flushed(n_chunks_flushed), .blocks_erased(n_blocks_erased), .log_wraps(fl_wraps),
    .bad_blocks(fl_bad));

  logic  rob_alloc_ready, rob_out_valid, rob_out_ready, rob_out_last;
  line_t rob_out_data;
  read_reorder_buffer #(.TAGS(ROB_TAGS), .LINES(PAGE_LINES)) u_rob (
    .clk, .rst_n, .alloc_valid(fl_rd_valid && fl_rd_ready), .alloc_ready(rob_alloc_ready),
    .alloc_tag(rob_tag), .in_valid(frdata_valid), .in_data(frdata),
    .out_valid(rob_out_valid), .out_ready(rob_out_ready), .out_data(rob_out_data), .out_last(rob_out_last));

  // ---------------- controller
  typedef enum logic [4:0] {
    C_IDLE, C_ALLOC, C_ALLOC_W, C_EV_APP, C_EV_RD, C_EV_RW, C_EV_WR, C_EV_UPD, C_EV_UPW,
    C_WR_HDR, C_WR_GATHER, C_WR_LINE, C_INS, C_INS_W, C_DRAIN,
    C_LOOKUP, C_LOOKUP_W, C_RESP, C_RD_REQ, C_RD_WAIT, C_RD_EMIT, C_DEL, C_DEL_W
  } cstate_e;
  cstate_e st;

  ht_cmd_t      c;
  logic [17:0]  obj_words, wcnt;         // words of the object / words moved
  logic [14:0]  obj_lines;
  logic         hit;
  dram_addr_t   slot, src_base, dst_base;
  slot_hdr_t    victim;
  logic [14:0]  ev_lines, lcnt;
  logic [FLASH_AW-1:0] ev_faddr;
  line_t        lbuf;
  logic [2:0]   wsel;
  index_entry_t found;
  logic         from_flash;
  // flash page read sequencing
  logic [13:0]  f_first_line;            // line offset in the chunk of the object's line 0
  logic [14:0]  f_line_idx;              // running line index within the chunk (consumer)
  logic [7:0]   f_iss_page, f_last_page;
  logic         f_issuing;

  function automatic logic [14:0] lines_of(input logic [KLEN_W-1:0] k, input logic [VLEN_W-1:0] v);
    logic [20:0] b;
    b = 21'(k) + 21'(v);
    return 15'((b + 21'd63) >> 6);
  endfunction

  // index table command mux
  always_comb begin
    it_cmd_valid = 1'b0; it_op = 2'd0; it_jhash = c.jhash; it_entry = '0; it_old_ptr = '0;
    it_entry.klen = c.klen; it_entry.hkey = c.hkey;
    case (st)
      C_LOOKUP: begin it_cmd_valid = 1'b1; it_op = 2'd0; end
      C_INS: begin
        it_cmd_valid = 1'b1; it_op = 2'd1;
        it_entry = '{timestamp: now, hkey: c.hkey, klen: c.klen, vlen: c.vlen,
                     ptr: {1'b0, 40'(slot) << 6}};
      end
      C_DEL: begin it_cmd_valid = 1'b1; it_op = 2'd2; end
      C_EV_UPD: begin
        it_cmd_valid = 1'b1; it_op = 2'd3; it_jhash = victim.jhash;
        it_entry.klen = victim.klen; it_entry.hkey = victim.hkey;
        it_entry.ptr  = {1'b1, ev_faddr};
        it_old_ptr    = {1'b0, 40'(slot) << 6};
      end
      default: ;
    endcase
  end

  assign cmd_ready    = (st == C_IDLE);
  assign sa_req_valid = (st == C_ALLOC);
  assign sa_lines     = 18'(obj_lines) + 18'd1;
  assign fl_app_valid = (st == C_EV_APP);
  assign fl_app_lines = ev_lines;
  assign in_ready     = (st == C_WR_GATHER) || (st == C_DRAIN);
  assign resp_valid   = (st == C_RESP);
  assign resp         = '{op: c.op, hit: hit, klen: c.klen, vlen: c.vlen, cidx: c.cidx};

  slot_hdr_t new_hdr;
  assign new_hdr = '{timestamp: now, jhash: c.jhash, hkey: c.hkey, klen: c.klen, vlen: c.vlen, pad: '0};

  // mover DRAM requests
  always_comb begin
    a_valid[2] = 1'b0;
    a_req[2]   = '0;
    case (st)
      C_EV_RD:  begin a_valid[2] = 1'b1; a_req[2].addr = slot + dram_addr_t'(lcnt); end
      C_EV_WR:  begin a_valid[2] = 1'b1; a_req[2].write = 1'b1; a_req[2].addr = dst_base + dram_addr_t'(lcnt); a_req[2].wdata = lbuf; end
      C_WR_HDR: begin
        a_valid[2] = 1'b1; a_req[2].write = 1'b1; a_req[2].addr = slot; a_req[2].wdata = new_hdr;
      end
      C_WR_LINE: begin a_valid[2] = 1'b1; a_req[2].write = 1'b1; a_req[2].addr = slot + dram_addr_t'(lcnt); a_req[2].wdata = lbuf; end
      C_RD_REQ:  if (!from_flash) begin a_valid[2] = 1'b1; a_req[2].addr = src_base + dram_addr_t'(lcnt); end
      default: ;
    endcase
  end

  // flash page read issue
  assign fl_lk_chunk  = found.ptr[39:20];
  assign fl_rd_page   = f_iss_page[6:0];
  assign fl_rd_valid  = f_issuing && rob_alloc_ready;
  assign rob_out_ready = (st == C_RD_REQ) && from_flash;

  // GET output
  assign out_valid = (st == C_RD_EMIT);
  assign out_word  = lbuf[511 - 64*wsel -: 64];
  assign out_last  = (wcnt == obj_words - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; c <= '0; obj_words <= '0; obj_lines <= '0; wcnt <= '0;
      hit <= 1'b0; slot <= '0; src_base <= '0; dst_base <= '0; victim <= '0; ev_lines <= '0;
      lcnt <= '0; ev_faddr <= '0; lbuf <= '0; wsel <= '0; found <= '0; from_flash <= 1'b0;
      f_first_line <= '0; f_line_idx <= '0;
      f_iss_page <= '0; f_last_page <= '0; f_issuing <= 1'b0;
      n_evictions <= '0; n_flash_reads <= '0; n_wb_reads <= '0;
    end else begin
      if (fl_rd_valid && fl_rd_ready) begin
        f_iss_page <= f_iss_page + 1'b1;
        if (f_iss_page == f_last_page) f_issuing <= 1'b0;
      end
      case (st)
        C_IDLE: if (cmd_valid) begin
          c         <= cmd;
          obj_words <= 18'((21'(cmd.klen) + 21'(cmd.vlen) + 21'd7) >> 3);
          obj_lines <= lines_of(cmd.klen, cmd.vlen);
          wcnt <= '0; lcnt <= '0; wsel <= '0; lbuf <= '0;
          case (cmd.op)
            HT_SET:  st <= C_ALLOC;
            HT_GET:  st <= C_LOOKUP;
            default: st <= C_DEL;
          endcase
        end
        // ---------------- SET
        C_ALLOC: if (sa_req_ready) st <= C_ALLOC_W;
        C_ALLOC_W: if (sa_resp_valid) begin
          slot   <= sa_addr;
          victim <= sa_victim;
          ev_lines <= 15'd1 + lines_of(sa_victim.klen, sa_victim.vlen);
          lcnt   <= '0;
          if (!sa_fit) begin hit <= 1'b0; st <= (obj_words == 0) ? C_RESP : C_DRAIN; end
          else if (sa_evict) begin
            n_evictions <= n_evictions + 1'b1;
            st <= ((16'd1 + 16'(lines_of(sa_victim.klen, sa_victim.vlen))) <= 16'(CHUNK_LINES)) ? C_EV_APP : C_WR_HDR;
          end else st <= C_WR_HDR;
        end
        C_EV_APP: if (fl_app_ready) begin
          ev_faddr <= fl_app_faddr;
          dst_base <= fl_app_daddr;
          st <= C_EV_RD;
        end
        C_EV_RD: if (a_ready[2]) st <= C_EV_RW;
        C_EV_RW: if (a_rvalid[2]) begin lbuf <= a_rdata; st <= C_EV_WR; end
        C_EV_WR: if (a_ready[2]) begin
          lcnt <= lcnt + 1'b1;
          st <= (lcnt == ev_lines - 1'b1) ? C_EV_UPD : C_EV_RD;
        end
        C_EV_UPD: if (it_cmd_ready) st <= C_EV_UPW;
        C_EV_UPW: if (it_resp_valid) st <= C_WR_HDR;
        C_WR_HDR: if (a_ready[2]) begin
          lcnt <= 15'd1; wsel <= '0; lbuf <= '0;
          st <= (obj_words == 0) ? C_INS : C_WR_GATHER;
        end
        C_WR_GATHER: if (in_valid) begin
          lbuf[511 - 64*wsel -: 64] <= in_word;
          wsel <= wsel + 1'b1;
          wcnt <= wcnt + 1'b1;
          if (wsel == 3'd7 || wcnt == obj_words - 1'b1) st <= C_WR_LINE;
        end
        C_WR_LINE: if (a_ready[2]) begin
          lcnt <= lcnt + 1'b1;
          lbuf <= '0;
          wsel <= '0;
          st <= (wcnt == obj_words) ? C_INS : C_WR_GATHER;
        end
        C_INS: if (it_cmd_ready) st <= C_INS_W;
        C_INS_W: if (it_resp_valid) begin hit <= 1'b1; st <= C_RESP; end
        C_DRAIN: if (in_valid) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == obj_words - 1'b1) st <= C_RESP;
        end
        // ---------------- DELETE
        C_DEL: if (it_cmd_ready) st <= C_DEL_W;
        C_DEL_W: if (it_resp_valid) begin hit <= it_resp_hit; st <= C_RESP; end
        // ---------------- GET
        C_LOOKUP: if (it_cmd_ready) st <= C_LOOKUP_W;
        C_LOOKUP_W: if (it_resp_valid) begin
          hit   <= it_resp_hit;
          found <= it_resp_entry;
          if (it_resp_hit) begin
            c.klen    <= it_resp_entry.klen;
            c.vlen    <= it_resp_entry.vlen;
            obj_words <= 18'((21'(it_resp_entry.klen) + 21'(it_resp_entry.vlen) + 21'd7) >> 3);
            obj_lines <= lines_of(it_resp_entry.klen, it_resp_entry.vlen);
          end
          st <= C_RESP;
        end
        C_RESP: if (resp_ready) begin
          if (c.op == HT_GET && hit && obj_words != 0) begin
            wcnt <= '0; lcnt <= 15'd1;
            if (!found.ptr[40]) begin
              from_flash <= 1'b0;
              src_base   <= dram_addr_t'(found.ptr[39:6]);
            end else if (fl_lk_hit) begin
              from_flash <= 1'b0;
              src_base   <= fl_lk_base + dram_addr_t'(found.ptr[19:6]);
              n_wb_reads <= n_wb_reads + 1'b1;
            end else begin
              from_flash    <= 1'b1;
              n_flash_reads <= n_flash_reads + 1'b1;
              f_first_line  <= found.ptr[19:6];
              f_iss_page    <= 8'(found.ptr[19:13]);
              f_last_page   <= 8'((15'(found.ptr[19:6]) + obj_lines) >> 7);
              f_line_idx    <= 15'(found.ptr[19:13]) << 7;
              f_issuing     <= 1'b1;
            end
            st <= C_RD_REQ;
          end else st <= C_IDLE;
        end
        C_RD_REQ: begin
          if (!from_flash) begin
            if (a_ready[2]) st <= C_RD_WAIT;
          end else if (rob_out_valid) begin
            // line f_line_idx of the chunk arrives; keep lines 1..obj_lines of the object
            f_line_idx <= f_line_idx + 1'b1;
            if (f_line_idx >= 15'(f_first_line) + 15'd1 &&
                f_line_idx <= 15'(f_first_line) + obj_lines && wcnt != obj_words) begin
              lbuf <= rob_out_data; wsel <= '0; st <= C_RD_EMIT;
            end else if (wcnt == obj_words && rob_out_last) st <= C_IDLE;
          end
        end
        C_RD_WAIT: if (a_rvalid[2]) begin lbuf <= a_rdata; wsel <= '0; st <= C_RD_EMIT; end
        C_RD_EMIT: if (out_ready) begin
          wsel <= wsel + 1'b1;
          wcnt <= wcnt + 1'b1;
          if (wcnt == obj_words - 1'b1) begin
            // object done; a flash read drains the rest of its last page
            st <= (from_flash && f_line_idx[6:0] != 7'd0) ? C_RD_REQ : C_IDLE;
          end else if (wsel == 3'd7) begin
            lcnt <= lcnt + 1'b1;
            st <= C_RD_REQ;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
