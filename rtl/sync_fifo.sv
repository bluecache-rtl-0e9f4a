// sync_fifo: synchronous first-in first-out queue with a valid/ready
// interface on both sides.  Storage is a DEPTH-entry array of type T,
// addressed by wrapping read and write pointers; an extra count register
// tells full from empty.  The head entry is visible combinationally on
// out_data while out_valid is high (zero-latency read).  One push and one pop
// may happen in the same cycle.  This queue backs the request/response
// queues of the design (LocQ/RemQ and the internal buffers).
//
// Own helper: a generic FIFO, not a block of the original.
module sync_fifo #(
  parameter type T     = logic [63:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + $clog2(DEPTH+1)'(push) - $clog2(DEPTH+1)'(pop);
    end
  end
endmodule
