// tb_net_splitter: instance A in request mode and instance B in response
// mode, both on node 1 of 4.  A receives SET and GET packets for random
// keys; each must leave, word for word, on the local port when
// jhash(key) mod 4 == 1 and on the remote port otherwise, tagged with the
// destination node, this node as source and the packet length in words.
// B receives packets carrying a destination and must route on it alone.
// Both outputs get random back-pressure; counters are compared.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_net_splitter;
  import bc_pkg::*;
  import tb_pkg::*;
  localparam int NN = 4, ME = 1, NP = 80;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid [2], in_ready [2], loc_valid [2], loc_ready [2], rem_valid [2], rem_ready [2];
  net_flit_t in [2], loc [2], rem [2];
  logic [31:0] n_local [2], n_remote [2];
  for (genvar m = 0; m < 2; m++) begin : g
    net_splitter #(.IS_REQ(m == 0), .NUM_NODES(NN)) u (.clk, .rst_n, .node_id(NODE_W'(ME)),
      .in_valid(in_valid[m]), .in_ready(in_ready[m]), .in(in[m]), .loc_valid(loc_valid[m]), .loc_ready(loc_ready[m]),
      .loc(loc[m]), .rem_valid(rem_valid[m]), .rem_ready(rem_ready[m]), .rem(rem[m]),
      .n_local(n_local[m]), .n_remote(n_remote[m]));
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  typedef struct { words_t w; int dest; } pkt_t;
  pkt_t exp [2][$];        // expected packets per mode, in order
  int nloc [2] = '{0, 0}, nrem [2] = '{0, 0};
  for (genvar m = 0; m < 2; m++) begin : g_chk
    int wi = 0;
    always @(posedge clk) begin
      loc_ready[m] <= $urandom_range(0, 3) != 0;
      rem_ready[m] <= $urandom_range(0, 3) != 0;
      if ((loc_valid[m] && loc_ready[m]) || (rem_valid[m] && rem_ready[m])) begin
        net_flit_t f;
        bit is_loc;
        is_loc = loc_valid[m] && loc_ready[m];
        f = is_loc ? loc[m] : rem[m];
        check(!(loc_valid[m] && rem_valid[m]), "one output at a time");
        if (exp[m].size() == 0) check(0, "unexpected output");
        else begin
          check(f.data == exp[m][0].w[wi] && f.last == (wi == exp[m][0].w.size() - 1), $sformatf("mode %0d word %0d", m, wi));
          check(is_loc == (exp[m][0].dest == ME) && int'(f.dest) == exp[m][0].dest, $sformatf("mode %0d route", m));
          if (m == 0) check(int'(f.src) == ME && int'(f.len) == exp[m][0].w.size(), "tags");
          wi++;
          if (wi == exp[m][0].w.size()) begin
            if (is_loc) nloc[m]++; else nrem[m]++;
            void'(exp[m].pop_front()); wi = 0;
          end
        end
      end
    end
  end

  task automatic drive(int m);
    for (int p = 0; p < NP; p++) begin
      pkt_t k;
      bytes_t key;
      key = make_key(p * 3 + m, 1 + (p * 7) % 60);
      k.w = build_req((p % 3 == 0) ? 8'h00 : 8'h01, key, make_val(p, (p * 13) % 100), 32'(p));
      k.dest = (m == 0) ? int'(ref_jhash(key) % NN) : (p * 5) % NN;
      exp[m].push_back(k);
      foreach (k.w[i]) begin
        net_flit_t f;
        f = '0; f.data = k.w[i]; f.last = (i == k.w.size() - 1);
        if (m == 1) begin f.dest = NODE_W'(k.dest); f.src = NODE_W'(ME); f.len = LEN_W'(k.w.size()); end
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        in_valid[m] = 1; in[m] = f;
        do @(posedge clk); while (!in_ready[m]);
        @(negedge clk); in_valid[m] = 0;
      end
    end
  endtask

  initial begin
    in_valid[0] = 0; in_valid[1] = 0; in[0] = '0; in[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    fork drive(0); drive(1); join
    repeat (200) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      check(exp[m].size() == 0, "all packets out");
      check(nloc[m] > 0 && nrem[m] > 0, "both local and remote traffic");
      check(int'(n_local[m]) == nloc[m] && int'(n_remote[m]) == nrem[m], "counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
