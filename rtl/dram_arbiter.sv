// dram_arbiter: shares the single DRAM port of a node between N clients
// (index table, slab store, data mover, flash write-buffer flush).
// Requests are granted round-robin, one per cycle.  The DRAM returns read data
// in request order, so the arbiter remembers the client of every read in a
// small FIFO and steers each returning line back to that client.  Writes
// produce no response.  Client i has priority right after client i-1 was
// served.
//
// Own design: the original says only that all DRAM users share one DDR3 port.
module dram_arbiter
  import bc_pkg::*;
#(
  parameter int N = 4,
  parameter int OUTSTANDING = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // clients
  input  logic [N-1:0]      c_req_valid,
  output logic [N-1:0]      c_req_ready,
  input  dram_req_t         c_req [N],
  output logic [N-1:0]      c_resp_valid,
  output line_t             c_resp_data,
  // DRAM
  output logic              m_req_valid,
  input  logic              m_req_ready,
  output dram_req_t         m_req,
  input  logic              m_resp_valid,
  input  line_t             m_resp_data
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last_grant, sel;
  logic          found;
  logic          tq_in_ready, tq_out_valid;
  logic [IW-1:0] tq_out;
  logic [$clog2(OUTSTANDING+1)-1:0] tq_count;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 1; k <= N; k++) begin
      if (!found && c_req_valid[(int'(last_grant) + k) % N]) begin
        found = 1'b1;
        sel   = IW'((int'(last_grant) + k) % N);
      end
    end
  end

  wire sel_is_read = !c_req[sel].write;
  assign m_req_valid = found && (!sel_is_read || tq_in_ready);
  assign m_req       = c_req[sel];

  always_comb begin
    c_req_ready = '0;
    if (found && m_req_ready && (!sel_is_read || tq_in_ready)) c_req_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_grant <= IW'(N-1);
    else if (m_req_valid && m_req_ready) last_grant <= sel;
  end

  sync_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_tag (
    .clk, .rst_n,
    .in_valid(m_req_valid && m_req_ready && sel_is_read), .in_ready(tq_in_ready), .in_data(sel),
    .out_valid(tq_out_valid), .out_ready(m_resp_valid), .out_data(tq_out), .count(tq_count));

  assign c_resp_data = m_resp_data;
  always_comb begin
    c_resp_valid = '0;
    if (m_resp_valid && tq_out_valid) c_resp_valid[tq_out] = 1'b1;
  end
endmodule
