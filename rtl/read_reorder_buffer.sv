// read_reorder_buffer: returns flash page reads in the order they were
// issued although the flash controller answers out of order.
//
// A reader first allocates a tag (tags are handed out in circular order, one
// per page read, and only while the tag is free), issues the flash read with
// that tag, and later receives the page's lines on the output port in
// allocation order.  Incoming lines of a page arrive in order and are written
// to the tag's page slot; the page's `last` line marks the tag complete.  The
// oldest tag is streamed out once it is complete, one line per cycle, with
// out_last on its final line, and then freed.  Buffer: TAGS pages of
// LINES lines each.
//
// Follows the original: pages answered out of order by flash are put back
// into request order. Own choices: 64 tags of one 8 KB page each.
module read_reorder_buffer
  import bc_pkg::*;
#(
  parameter int TAGS       = 64,
  parameter int LINES = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // tag allocation
  input  logic              alloc_valid,
  output logic              alloc_ready,
  output logic [FTAG_W-1:0] alloc_tag,
  // flash read data (out of order between pages)
  input  logic              in_valid,
  input  flash_rdata_t      in_data,
  // in-order output
  output logic              out_valid,
  input  logic              out_ready,
  output line_t             out_data,
  output logic              out_last
);
  localparam int TW = $clog2(TAGS);
  localparam int LW = $clog2(LINES);

  line_t             mem [TAGS*LINES];
  logic [TAGS-1:0]   busy, done;
  logic [LW-1:0]     wcnt [TAGS];
  logic [TW-1:0]     head, tail;
  logic [LW-1:0]     rcnt;

  wire [TW-1:0] itag = in_data.tag[TW-1:0];
  assign alloc_ready = !busy[tail];
  assign alloc_tag   = FTAG_W'(tail);
  assign out_valid   = done[head];
  assign out_data    = mem[{head, rcnt}];
  assign out_last    = (rcnt == LW'(LINES-1));

  always_ff @(posedge clk) begin
    if (in_valid) mem[{itag, wcnt[itag]}] <= in_data.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0; done <= '0; head <= '0; tail <= '0; rcnt <= '0;
      for (int t = 0; t < TAGS; t++) wcnt[t] <= '0;
    end else begin
      if (alloc_valid && alloc_ready) begin
        busy[tail] <= 1'b1;
        tail <= tail + 1'b1;
      end
      if (in_valid) begin
        wcnt[itag] <= wcnt[itag] + 1'b1;
        if (in_data.last) done[itag] <= 1'b1;
      end
      if (out_valid && out_ready) begin
        rcnt <= rcnt + 1'b1;
        if (out_last) begin
          done[head] <= 1'b0;
          busy[head] <= 1'b0;
          wcnt[head] <= '0;
          head <= head + 1'b1;
          rcnt <= '0;
        end
      end
    end
  end
endmodule
