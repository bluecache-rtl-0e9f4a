// slab_allocator: slot management of the slab-structured DRAM store.
//
// The DRAM store is split into NUM_CLASSES slab classes; class c owns a
// region of REGION_LINES DRAM lines cut into slots of 2^(c+1) lines
// (128 B, 256 B, ... 2 MB).  A request gives the number of lines an object
// needs (its header line included) and receives the DRAM line address of a
// slot in the smallest class that holds it.  Slots of a class are handed out
// in order until the class is full.  From then on a pseudo-LRU victim is
// chosen: four random slots of the class (16-bit LFSR) have their first line
// (slot header, timestamp in bits [511:480]) read from DRAM, and the slot with
// the oldest timestamp is returned together with its header, so the caller
// can move the old object to flash and fix its index entry through the
// back-trace information.  Freed slots are not recycled: a deleted object
// stays in its slot until it is evicted.
//
// Timing: a free slot is answered two cycles after the request; an eviction
// costs four DRAM header reads more.
module slab_allocator
  import bc_pkg::*;
#(
  parameter int         NUM_CLASSES  = 15,
  parameter int         REGION_BITS  = 22,            // 2^22 lines = 256 MB per class
  parameter dram_addr_t SLAB_BASE    = dram_addr_t'(1) << 25,
  parameter int         CANDIDATES   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [17:0]       req_lines,
  output logic              resp_valid,
  input  logic              resp_ready,
  output dram_addr_t        resp_addr,
  output logic [4:0]        resp_class,
  output logic              resp_evict,
  output slot_hdr_t         resp_victim,
  output logic              resp_fit,      // 0: object larger than the largest slot
  // DRAM (header reads)
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_resp_valid,
  input  line_t             dram_resp_data
);
  localparam int CW = $clog2(NUM_CLASSES);
  typedef enum logic [2:0] {S_IDLE, S_CLASS, S_RD, S_WAIT, S_RESP} state_e;
  state_e state;

  logic [REGION_BITS:0] used [NUM_CLASSES];
  logic [17:0]          lines;
  logic [CW-1:0]        cls;
  logic                 fit;
  logic [15:0]          lfsr;
  logic [$clog2(CANDIDATES+1)-1:0] cand;
  dram_addr_t           cand_addr;
  logic [TS_W-1:0]      best_ts;

  function automatic dram_addr_t slot_addr(input logic [CW-1:0] c, input logic [REGION_BITS-1:0] idx);
    dram_addr_t region, a;
    region = SLAB_BASE + (dram_addr_t'(c) << REGION_BITS);
    a = region + (dram_addr_t'(idx) << (c + 1));
    return a;
  endfunction

  // class selection: smallest c with 2^(c+1) >= lines
  logic [CW-1:0] sel_c;
  logic          sel_fit;
  always_comb begin
    sel_c = '0; sel_fit = 1'b0;
    for (int c = NUM_CLASSES-1; c >= 0; c--)
      if ((32'd2 << c) >= {14'd0, lines}) begin sel_c = CW'(c); sel_fit = 1'b1; end
  end

  logic [CW-1:0]        cur_c;
  logic [REGION_BITS:0] slots_of_cls;
  assign cur_c        = (state == S_CLASS) ? sel_c : cls;
  assign slots_of_cls = (REGION_BITS+1)'(1) << (REGION_BITS - 1 - int'(cur_c));
  logic [REGION_BITS-1:0] rnd_idx;
  assign rnd_idx = REGION_BITS'({lfsr, lfsr}) & REGION_BITS'(slots_of_cls - 1'b1);

  assign req_ready      = (state == S_IDLE);
  assign resp_valid     = (state == S_RESP);
  assign resp_class     = 5'(cls);
  assign resp_fit       = fit;
  assign dram_req_valid = (state == S_RD);
  always_comb begin
    dram_req       = '0;
    dram_req.write = 1'b0;
    dram_req.addr  = cand_addr;
  end

  slot_hdr_t rd_hdr;   // header of the candidate slot being read
  assign rd_hdr = dram_resp_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; lines <= '0; cls <= '0; fit <= 1'b0; lfsr <= 16'hACE1; cand <= '0;
      cand_addr <= '0; best_ts <= '0; resp_addr <= '0; resp_evict <= 1'b0; resp_victim <= '0;
      for (int c = 0; c < NUM_CLASSES; c++) used[c] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      case (state)
        S_IDLE: if (req_valid) begin
          lines <= req_lines;
          state <= S_CLASS;
        end
        S_CLASS: begin
          cls <= sel_c;
          fit <= sel_fit;
          resp_evict <= 1'b0;
          if (!sel_fit) state <= S_RESP;
          else if (used[sel_c] < ((REGION_BITS+1)'(1) << (REGION_BITS - 1 - int'(sel_c)))) begin
            resp_addr    <= slot_addr(sel_c, used[sel_c][REGION_BITS-1:0]);
            used[sel_c]  <= used[sel_c] + 1'b1;
            state        <= S_RESP;
          end else begin
            cand  <= '0;
            state <= S_RD;
          end
        end
        S_RD: begin
          if (dram_req_ready) state <= S_WAIT;
        end
        S_WAIT: if (dram_resp_valid) begin
          if (cand == 0 || rd_hdr.timestamp < best_ts) begin
            best_ts     <= rd_hdr.timestamp;
            resp_addr   <= cand_addr;
            resp_victim <= rd_hdr;
          end
          resp_evict <= 1'b1;
          cand <= cand + 1'b1;
          state <= (cand == CANDIDATES-1) ? S_RESP : S_RD;
        end
        S_RESP: if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      // next candidate address is drawn whenever a read is about to be issued
      if ((state == S_CLASS) || (state == S_WAIT && dram_resp_valid))
        cand_addr <= slot_addr(cur_c, rnd_idx);
    end
  end
endmodule
