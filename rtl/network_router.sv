// network_router: one node's router of the inter-controller network
// (one instance carries requests, a second one responses).  Nodes form a
// linear array with ids rising towards the east; a packet whose destination
// is this node is ejected, otherwise it moves one hop west or east.
//
// Every hop uses the reserve / acknowledge / transfer handshake: before
// sending, the sender raises rsv_valid with the number of words it wants to
// send (at most RX_DEPTH, so a long packet is sent in several reservations);
// the receiver acknowledges (rsv_ack, one cycle) once that much of its
// receive buffer is free and not promised to anyone, and the sender then
// sends exactly that many words (d_valid, no back-pressure on the wire).
// Outputs (eject, west, east) are each granted to one input (inject, west,
// east) for a whole packet, round-robin between inputs, so remote traffic is
// interleaved fairly.  The serial transceivers and the transport layer under
// this handshake are outside this module: links are plain parallel signals.
//
// Follows the original: the reserve / acknowledge / payload handshake on
// every hop and the linear array. Own choices: the 64-word receive buffer,
// splitting long packets into several reservations, and round-robin output
// grants.
module network_router
  import bc_pkg::*;
#(
  parameter int RX_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // local inject / eject
  input  logic              inj_valid,
  output logic              inj_ready,
  input  net_flit_t         inj,
  output logic              ej_valid,
  input  logic              ej_ready,
  output net_flit_t         ej,
  // links: index 0 = west, 1 = east
  output logic [1:0]        tx_rsv_valid,
  output logic [LEN_W-1:0]  tx_rsv_words [2],
  input  logic [1:0]        tx_rsv_ack,
  output logic [1:0]        tx_d_valid,
  output net_flit_t         tx_d [2],
  input  logic [1:0]        rx_rsv_valid,
  input  logic [LEN_W-1:0]  rx_rsv_words [2],
  output logic [1:0]        rx_rsv_ack,
  input  logic [1:0]        rx_d_valid,
  input  net_flit_t         rx_d [2],
  output logic [31:0]       n_reservations
);
  localparam int CW = $clog2(RX_DEPTH+1);

  // ---------------- receive buffers
  logic [1:0]   rxq_valid, rxq_ready;
  net_flit_t    rxq [2];
  logic [CW-1:0] rxq_count [2];
  logic [CW-1:0] promised [2];
  logic [1:0]    rxq_in_ready;

  for (genvar l = 0; l < 2; l++) begin : g_rx
    sync_fifo #(.T(net_flit_t), .DEPTH(RX_DEPTH)) u_rxq (
      .clk, .rst_n, .in_valid(rx_d_valid[l]), .in_ready(rxq_in_ready[l]), .in_data(rx_d[l]),
      .out_valid(rxq_valid[l]), .out_ready(rxq_ready[l]), .out_data(rxq[l]), .count(rxq_count[l]));

    wire [CW:0] free_space = (CW+1)'(RX_DEPTH) - (CW+1)'(rxq_count[l]) - (CW+1)'(promised[l]);
    wire grant = rx_rsv_valid[l] && !rx_rsv_ack[l] && ({{(LEN_W-CW-1){1'b0}}, free_space} >= rx_rsv_words[l]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        promised[l] <= '0; rx_rsv_ack[l] <= 1'b0;
      end else begin
        rx_rsv_ack[l] <= grant;
        promised[l] <= promised[l] + (grant ? CW'(rx_rsv_words[l]) : '0) - CW'(rx_d_valid[l]);
      end
    end
  end

  // ---------------- inputs: 0 inject, 1 west rx, 2 east rx
  logic [2:0]  iv;
  net_flit_t   id [3];
  logic [2:0]  ir;
  assign iv = {rxq_valid[1], rxq_valid[0], inj_valid};
  assign id[0] = inj; assign id[1] = rxq[0]; assign id[2] = rxq[1];
  assign inj_ready = ir[0];
  assign rxq_ready = ir[2:1];

  function automatic logic [1:0] route(input logic [NODE_W-1:0] d, input logic [NODE_W-1:0] me);
    if (d == me) return 2'd0;
    else if (d < me) return 2'd1;
    else return 2'd2;
  endfunction

  // ---------------- outputs: 0 eject, 1 west tx, 2 east tx
  logic [2:0]  busy;
  logic [1:0]  owner [3];
  logic [1:0]  rr [3];
  typedef enum logic [1:0] {T_IDLE, T_RSV, T_SEND} tstate_e;
  tstate_e     ts [2];
  logic [LEN_W-1:0] credit [2];
  logic [LEN_W-1:0] remain [2];   // words of the packet still to send

  logic [2:0] pick_valid;
  logic [1:0] pick [3];
  always_comb begin
    for (int o = 0; o < 3; o++) begin
      pick_valid[o] = 1'b0; pick[o] = '0;
      for (int k = 1; k <= 3; k++) begin
        int i;
        i = (int'(rr[o]) + k) % 3;
        if (!pick_valid[o] && iv[i] && route(id[i].dest, node_id) == 2'(o)) begin
          pick_valid[o] = 1'b1; pick[o] = 2'(i);
        end
      end
    end
  end

  // output valids (independent of any ready)
  assign ej_valid = busy[0] && iv[owner[0]];
  assign ej       = id[owner[0]];
  always_comb begin
    for (int l = 0; l < 2; l++) begin
      tx_d_valid[l]   = (ts[l] == T_SEND) && busy[l+1] && iv[owner[l+1]] && (credit[l] != 0);
      tx_d[l]         = id[owner[l+1]];
      tx_rsv_valid[l] = (ts[l] == T_RSV);
      tx_rsv_words[l] = (remain[l] > LEN_W'(RX_DEPTH)) ? LEN_W'(RX_DEPTH) : remain[l];
    end
  end

  // transfers and input readies
  logic [2:0] xfer;
  assign xfer = {tx_d_valid[1], tx_d_valid[0], ej_valid && ej_ready};
  always_comb begin
    ir = '0;
    for (int o = 0; o < 3; o++) if (xfer[o]) ir[owner[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0; n_reservations <= '0;
      for (int o = 0; o < 3; o++) begin owner[o] <= '0; rr[o] <= 2'd2; end
      for (int l = 0; l < 2; l++) begin ts[l] <= T_IDLE; credit[l] <= '0; remain[l] <= '0; end
    end else begin
      for (int o = 0; o < 3; o++) begin
        if (!busy[o] && pick_valid[o] && (o == 0 || ts[o-1] == T_IDLE)) begin
          busy[o]  <= 1'b1;
          owner[o] <= pick[o];
          rr[o]    <= pick[o];
          if (o > 0) begin
            ts[o-1]     <= T_RSV;
            remain[o-1] <= id[pick[o]].len;
          end
        end
        if (xfer[o] && id[owner[o]].last) busy[o] <= 1'b0;
      end
      for (int l = 0; l < 2; l++) begin
        case (ts[l])
          T_RSV: if (tx_rsv_ack[l]) begin
            credit[l] <= tx_rsv_words[l];
            remain[l] <= remain[l] - tx_rsv_words[l];
            n_reservations <= n_reservations + 1'b1;
            ts[l] <= T_SEND;
          end
          T_SEND: if (xfer[l+1]) begin
            credit[l] <= credit[l] - 1'b1;
            if (id[owner[l+1]].last) ts[l] <= T_IDLE;
            else if (credit[l] == 1) ts[l] <= T_RSV;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
