// dma_write_engine: response half of the client-BlueCache network engine.
//
// Responses are appended word by word, in circular order, to the client's
// 1 MB response buffer of 128 segments of 8 KB.  When a segment is full the
// engine raises an interrupt with its index and word count and moves on to
// the next segment, which must have been released by software (seg_free_*);
// until then the response stream stalls.  If a segment holds data but no
// response word has arrived for FLUSH_IDLE cycles, it is handed over early
// in the same way so that a lone response is not held back.  Each host write
// carries one 64-bit word and its byte address.
//
// Follows the original: a 1 MB host ring of 128 segments, one interrupt per
// filled segment and release of the segment by software. Own choice: a partly
// filled segment is handed over after FLUSH_IDLE idle cycles.
module dma_write_engine
  import bc_pkg::*;
#(
  parameter int          SEGMENTS   = 128,
  parameter int          SEG_WORDS  = 1024,
  parameter int          FLUSH_IDLE = 256,
  parameter logic [63:0] BUF_BASE   = 64'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  net_flit_t         in,
  // host memory writes
  output logic              hw_valid,
  input  logic              hw_ready,
  output logic [63:0]       hw_addr,
  output logic [63:0]       hw_data,
  // interrupt: segment handed to software
  output logic              irq_valid,
  output logic [$clog2(SEGMENTS)-1:0] irq_idx,
  output logic [$clog2(SEG_WORDS+1)-1:0] irq_words,
  // software: segment consumed and free again
  input  logic              seg_free_valid,
  input  logic [$clog2(SEGMENTS)-1:0] seg_free_idx,
  output logic [31:0]       n_early_flush
);
  localparam int SW = $clog2(SEGMENTS);
  localparam int WW = $clog2(SEG_WORDS+1);

  logic [SEGMENTS-1:0] owned;        // 1: segment held by software
  logic [SW-1:0]       cur;
  logic [WW-1:0]       fill;
  logic [$clog2(FLUSH_IDLE+1)-1:0] idle;

  wire can_write = !owned[cur];
  assign hw_valid = in_valid && can_write && (fill != WW'(SEG_WORDS));
  assign in_ready = hw_ready && can_write && (fill != WW'(SEG_WORDS));
  assign hw_addr  = BUF_BASE + 64'(cur) * 64'(SEG_WORDS * 8) + 64'(fill) * 64'd8;
  assign hw_data  = in.data;

  wire full_now  = hw_valid && hw_ready && (fill == WW'(SEG_WORDS-1));
  wire idle_out  = !full_now && (fill != 0) && (idle == ($clog2(FLUSH_IDLE+1))'(FLUSH_IDLE));
  assign irq_valid = full_now || idle_out;
  assign irq_idx   = cur;
  assign irq_words = full_now ? WW'(SEG_WORDS) : fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned <= '0; cur <= '0; fill <= '0; idle <= '0; n_early_flush <= '0;
    end else begin
      if (seg_free_valid) owned[seg_free_idx] <= 1'b0;
      if (hw_valid && hw_ready) begin
        fill <= fill + 1'b1;
        idle <= '0;
      end else if (fill != 0 && idle != ($clog2(FLUSH_IDLE+1))'(FLUSH_IDLE)) idle <= idle + 1'b1;
      if (irq_valid) begin
        owned[cur] <= 1'b1;
        cur  <= cur + 1'b1;
        fill <= '0;
        idle <= '0;
        if (idle_out) n_early_flush <= n_early_flush + 1'b1;
      end
    end
  end
endmodule
