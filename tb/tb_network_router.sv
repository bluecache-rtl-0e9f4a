// tb_network_router: three routers in a linear array, linked like the
// cluster (east transmit of node n to west receive of node n+1 and back).
// Every node injects packets of 1..40 words to random destinations,
// including itself, with a small receive buffer (RX_DEPTH 16) so long
// packets need several reservations.  Ejection has random back-pressure.
// Checks: every packet arrives at its destination only, intact, with the
// packets of one source in order; packets are not interleaved at an
// ejection port; multi-hop traffic (node 0 <-> node 2) is delivered and
// reservations are counted.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_network_router;
  import bc_pkg::*;
  localparam int N = 3, NP = 60, D = 16;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inj_valid [N], inj_ready [N], ej_valid [N], ej_ready [N];
  net_flit_t inj [N], ej [N];
  logic [1:0] tx_rsv_valid [N], tx_rsv_ack [N], tx_d_valid [N], rx_rsv_valid [N], rx_rsv_ack [N], rx_d_valid [N];
  logic [LEN_W-1:0] tx_rsv_words [N][2], rx_rsv_words [N][2];
  net_flit_t tx_d [N][2], rx_d [N][2];
  logic [31:0] n_res [N];

  for (genvar n = 0; n < N; n++) begin : g
    network_router #(.RX_DEPTH(D)) u (.clk, .rst_n, .node_id(NODE_W'(n)),
      .inj_valid(inj_valid[n]), .inj_ready(inj_ready[n]), .inj(inj[n]),
      .ej_valid(ej_valid[n]), .ej_ready(ej_ready[n]), .ej(ej[n]),
      .tx_rsv_valid(tx_rsv_valid[n]), .tx_rsv_words(tx_rsv_words[n]), .tx_rsv_ack(tx_rsv_ack[n]),
      .tx_d_valid(tx_d_valid[n]), .tx_d(tx_d[n]),
      .rx_rsv_valid(rx_rsv_valid[n]), .rx_rsv_words(rx_rsv_words[n]), .rx_rsv_ack(rx_rsv_ack[n]),
      .rx_d_valid(rx_d_valid[n]), .rx_d(rx_d[n]), .n_reservations(n_res[n]));
    // west side
    if (n == 0) begin : g_w0
      assign rx_rsv_valid[n][0] = 1'b0; assign rx_rsv_words[n][0] = '0; assign tx_rsv_ack[n][0] = 1'b0;
      assign rx_d_valid[n][0] = 1'b0;   assign rx_d[n][0] = '0;
    end else begin : g_w
      assign rx_rsv_valid[n][0] = tx_rsv_valid[n-1][1]; assign rx_rsv_words[n][0] = tx_rsv_words[n-1][1];
      assign tx_rsv_ack[n][0]   = rx_rsv_ack[n-1][1];
      assign rx_d_valid[n][0]   = tx_d_valid[n-1][1];   assign rx_d[n][0] = tx_d[n-1][1];
    end
    // east side
    if (n == N - 1) begin : g_eN
      assign rx_rsv_valid[n][1] = 1'b0; assign rx_rsv_words[n][1] = '0; assign tx_rsv_ack[n][1] = 1'b0;
      assign rx_d_valid[n][1] = 1'b0;   assign rx_d[n][1] = '0;
    end else begin : g_e
      assign rx_rsv_valid[n][1] = tx_rsv_valid[n+1][0]; assign rx_rsv_words[n][1] = tx_rsv_words[n+1][0];
      assign tx_rsv_ack[n][1]   = rx_rsv_ack[n+1][0];
      assign rx_d_valid[n][1]   = tx_d_valid[n+1][0];   assign rx_d[n][1] = tx_d[n+1][0];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // packet p from node s: destination and length are a function of (s, p)
  function automatic int pdest(int s, int p); return (s * 5 + p * 7 + p / 3) % N; endfunction
  function automatic int plen(int s, int p);  return 1 + (s * 11 + p * 17) % 40; endfunction

  int exp_next [N][N];      // [dest][src] next packet index expected
  int got [N];
  int far = 0;
  for (genvar n = 0; n < N; n++) begin : g_chk
    int cs = -1, ci = 0;
    always @(posedge clk) begin
      ej_ready[n] <= $urandom_range(0, 3) != 0;
      if (ej_valid[n] && ej_ready[n]) begin
        int s, p, i;
        s = int'(ej[n].data[63:48]); p = int'(ej[n].data[47:16]); i = int'(ej[n].data[15:0]);
        if (cs < 0) begin
          cs = s; ci = 0;
          while (exp_next[n][s] < NP && pdest(s, exp_next[n][s]) != n) exp_next[n][s]++;
        end
        check(s == cs && p == exp_next[n][s] && i == ci && pdest(s, p) == n && int'(ej[n].src) == s,
              $sformatf("node %0d got s=%0d p=%0d i=%0d", n, s, p, i));
        check(ej[n].last == (i == plen(s, p) - 1), "last");
        ci++;
        if (ej[n].last) begin
          exp_next[n][cs]++; got[n]++; cs = -1;
          if ((s == 0 && n == N - 1) || (s == N - 1 && n == 0)) far++;
        end
      end
    end
  end

  task automatic drive(int s);
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < plen(s, p); i++) begin
        net_flit_t f;
        f.dest = NODE_W'(pdest(s, p)); f.src = NODE_W'(s); f.len = LEN_W'(plen(s, p));
        f.data = {16'(s), 32'(p), 16'(i)}; f.last = (i == plen(s, p) - 1);
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        inj_valid[s] = 1; inj[s] = f;
        do @(posedge clk); while (!inj_ready[s]);
        @(negedge clk); inj_valid[s] = 0;
      end
  endtask

  int total;
  initial begin
    for (int n = 0; n < N; n++) begin inj_valid[n] = 0; inj[n] = '0; got[n] = 0; for (int m = 0; m < N; m++) exp_next[n][m] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    fork drive(0); drive(1); drive(2); join
    repeat (500) @(negedge clk);
    total = 0;
    for (int n = 0; n < N; n++) total += got[n];
    check(total == N * NP, $sformatf("all packets delivered (%0d)", total));
    check(far > 0, "two-hop packets delivered");
    check(n_res[0] > 0 && n_res[1] > 0 && n_res[2] > 0, "reservations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
