// net_merger: the merger of the inter-node network engine.  It joins the
// local stream and the stream arriving from remote nodes into one, a whole
// packet at a time.  When both have a packet waiting the two take turns, so
// the local node always gets at least half of the downstream bandwidth and
// the remote nodes (already interleaved fairly by the router) share the
// rest.  A packet keeps the output until its last word has passed.
//
// Follows the original: local and remote streams are merged into one queue.
// Own choice: whole packets alternate between the two inputs.
module net_merger
  import bc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      loc_valid,
  output logic      loc_ready,
  input  net_flit_t loc,
  input  logic      rem_valid,
  output logic      rem_ready,
  input  net_flit_t rem,
  output logic      out_valid,
  input  logic      out_ready,
  output net_flit_t out,
  output logic [31:0] n_local,
  output logic [31:0] n_remote
);
  logic busy, owner, last_was_rem;     // owner: 0 local, 1 remote
  logic pick;
  always_comb begin
    if (loc_valid && rem_valid) pick = !last_was_rem;
    else                        pick = rem_valid;
  end
  wire sel = busy ? owner : pick;
  assign out       = sel ? rem : loc;
  assign out_valid = sel ? rem_valid : loc_valid;
  assign loc_ready = !sel && out_ready;
  assign rem_ready =  sel && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; owner <= 1'b0; last_was_rem <= 1'b1; n_local <= '0; n_remote <= '0;
    end else if (out_valid && out_ready) begin
      if (!busy) begin
        owner <= sel;
        last_was_rem <= sel;
        if (sel) n_remote <= n_remote + 1'b1; else n_local <= n_local + 1'b1;
      end
      busy <= !out.last;
    end
  end
endmodule
