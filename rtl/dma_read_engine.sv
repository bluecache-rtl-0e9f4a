// dma_read_engine: request half of the client-BlueCache network engine.
//
// The client keeps a 1 MB circular request buffer in its memory, cut into
// 128 segments of 8 KB.  When software has filled a segment (or flushes a
// partly filled one) it posts the segment index and the number of valid
// 64-bit words.  The engine reads the segment by DMA in bursts of BURST
// words, streams the words out in FIFO order, and acknowledges the segment
// index once all its words have arrived so that software can reuse it.
// Requests are a contiguous stream of memcached binary packets, each padded
// to a multiple of 8 bytes; a packet may continue in the next posted segment.
// The engine finds packet boundaries from the body length in the header and
// marks the final word of each packet with `last`.
// A burst is only requested when the output FIFO can take all of it.
//
// Follows the original: a 1 MB host ring of 128 segments, posted by software
// with a segment index and acknowledged after reading. Own choices: 16-word
// bursts, in-order data return and the word count per posted segment.
module dma_read_engine
  import bc_pkg::*;
#(
  parameter int          SEGMENTS  = 128,
  parameter int          SEG_WORDS = 1024,          // 8 KB
  parameter int          BURST     = 16,            // words per DMA read burst
  parameter logic [63:0] BUF_BASE  = 64'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  // software: segment ready
  input  logic              seg_valid,
  output logic              seg_ready,
  input  logic [$clog2(SEGMENTS)-1:0] seg_idx,
  input  logic [$clog2(SEG_WORDS+1)-1:0] seg_words,
  // software: segment consumed
  output logic              ack_valid,
  output logic [$clog2(SEGMENTS)-1:0] ack_idx,
  // host memory reads
  output logic              hr_valid,
  input  logic              hr_ready,
  output logic [63:0]       hr_addr,
  output logic [7:0]        hr_words,
  input  logic              hd_valid,
  input  logic [63:0]       hd_data,
  // request stream
  output logic              out_valid,
  input  logic              out_ready,
  output net_flit_t         out
);
  localparam int SW = $clog2(SEGMENTS);
  localparam int WW = $clog2(SEG_WORDS+1);
  localparam int FD = 4 * BURST;

  typedef struct packed { logic [SW-1:0] idx; logic [WW-1:0] words; } seg_t;
  logic  sq_valid, sq_pop;
  seg_t  sq_head;
  logic [$clog2(SEGMENTS+1)-1:0] sq_count;
  sync_fifo #(.T(seg_t), .DEPTH(SEGMENTS)) u_segq (
    .clk, .rst_n, .in_valid(seg_valid), .in_ready(seg_ready), .in_data('{idx: seg_idx, words: seg_words}),
    .out_valid(sq_valid), .out_ready(sq_pop), .out_data(sq_head), .count(sq_count));

  // burst issue
  logic [WW-1:0] issued, received;
  logic [$clog2(FD+1)-1:0] inflight, df_count;
  wire [WW-1:0] left = sq_head.words - issued;
  wire [7:0]    blen = (left > WW'(BURST)) ? 8'(BURST) : 8'(left);
  assign hr_valid = sq_valid && (left != 0) && ((32'(df_count) + 32'(inflight) + BURST) <= FD);
  assign hr_addr  = BUF_BASE + (64'(sq_head.idx) * 64'(SEG_WORDS * 8)) + 64'(issued) * 64'd8;
  assign hr_words = blen;

  // a posted segment with zero words is acknowledged at once
  assign sq_pop    = sq_valid && (received + WW'(hd_valid) == sq_head.words) && (issued == sq_head.words);
  assign ack_valid = sq_pop;
  assign ack_idx   = sq_head.idx;

  logic        df_valid, df_in_ready;
  logic [63:0] df_data;
  sync_fifo #(.T(logic [63:0]), .DEPTH(FD)) u_data (
    .clk, .rst_n, .in_valid(hd_valid), .in_ready(df_in_ready), .in_data(hd_data),
    .out_valid(df_valid), .out_ready(out_valid && out_ready), .out_data(df_data), .count(df_count));

  // packet framing
  logic [LEN_W-1:0] pw, plen;
  wire [LEN_W-1:0] cur_len = (pw == 1) ? pkt_words(df_data[63:32]) : plen;
  assign out_valid = df_valid;
  always_comb begin
    out      = '0;
    out.data = df_data;
    out.len  = cur_len;
    out.last = (pw >= 2) && (pw == cur_len - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued <= '0; received <= '0; inflight <= '0; pw <= '0; plen <= '0;
    end else begin
      inflight <= inflight + ((hr_valid && hr_ready) ? ($clog2(FD+1))'(blen) : '0) - ($clog2(FD+1))'(hd_valid);
      if (sq_pop) begin
        issued <= '0; received <= '0;
      end else begin
        if (hr_valid && hr_ready) issued <= issued + WW'(blen);
        if (hd_valid) received <= received + 1'b1;
      end
      if (out_valid && out_ready) begin
        if (pw == 1) plen <= pkt_words(df_data[63:32]);
        pw <= out.last ? '0 : pw + 1'b1;
      end
    end
  end
endmodule
