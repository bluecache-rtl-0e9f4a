// dram_model: behavioural model of the node's DDR3 DRAM behind its
// controller, seen as 64-byte lines.  Sparse storage (unwritten lines read
// as zero), in-order read responses after LAT cycles, and a request port
// that is ready except in random stall cycles when STALL is set.
//
// Behavioural stand-in for the DDR3 memory, which the original does not
// design. Its latency and stalls are own choices.
module dram_model
  import bc_pkg::*;
#(
  parameter int LAT   = 6,
  parameter bit STALL = 1'b1
) (
  input  logic      clk,
  input  logic      req_valid,
  output logic      req_ready,
  input  dram_req_t req,
  output logic      resp_valid,
  output line_t     resp_data
);
  line_t mem [dram_addr_t];
  typedef struct { int unsigned due; line_t d; } pend_t;
  pend_t q[$];
  int unsigned cyc = 0;
  logic rdy = 1'b1;
  assign req_ready = rdy;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) begin
      if (req.write) mem[req.addr] = req.wdata;
      else q.push_back('{due: cyc + LAT, d: mem.exists(req.addr) ? mem[req.addr] : '0});
    end
    resp_valid <= 1'b0;
    if (q.size() > 0 && q[0].due <= cyc) begin
      resp_valid <= 1'b1;
      resp_data  <= q[0].d;
      void'(q.pop_front());
    end
    rdy <= STALL ? ($urandom_range(0, 7) != 0) : 1'b1;
  end
  initial begin resp_valid = 1'b0; resp_data = '0; end
endmodule
