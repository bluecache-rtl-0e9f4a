// tb_net_merger: random packets on the local and the remote input with
// random valid gaps and output back-pressure.  Checks that packets are
// never interleaved on the output, that every packet of each input arrives
// intact and in order, that both inputs are served when both are busy
// (alternating priority) and that the local/remote counters match.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_net_merger;
  import bc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic loc_valid = 0, loc_ready, rem_valid = 0, rem_ready, out_valid, out_ready = 0;
  net_flit_t loc = '0, rem = '0, out;
  logic [31:0] n_local, n_remote;
  int checks = 0, failures = 0;
  net_merger dut (.*);
  localparam int NP = 150;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // packet p of source s: words {s, p, i}, length 1..9
  function automatic int plen(int s, int p); return 1 + (s * 7 + p * 13) % 9; endfunction

  int exp_p [2] = '{0, 0};
  int cur_s = -1, cur_i = 0, switches = 0, last_s = -1;
  always @(posedge clk) begin
    out_ready <= $urandom_range(0, 3) != 0;
    if (out_valid && out_ready) begin
      int s, p, i;
      s = int'(out.data[63:48]); p = int'(out.data[47:16]); i = int'(out.data[15:0]);
      if (cur_s < 0) begin
        cur_s = s; cur_i = 0;
        if (s != last_s) switches++;
        last_s = s;
      end
      check(s == cur_s && p == exp_p[s] && i == cur_i, $sformatf("word s=%0d p=%0d i=%0d", s, p, i));
      check(out.last == (i == plen(s, p) - 1), "last flag");
      cur_i++;
      if (out.last) begin exp_p[cur_s]++; cur_s = -1; end
    end
  end

  task automatic drive(int s);
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < plen(s, p); i++) begin
        net_flit_t f;
        f = '0; f.data = {16'(s), 32'(p), 16'(i)}; f.last = (i == plen(s, p) - 1);
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        if (s == 0) begin loc_valid = 1; loc = f; end else begin rem_valid = 1; rem = f; end
        do @(posedge clk); while (s == 0 ? !loc_ready : !rem_ready);
        @(negedge clk);
        if (s == 0) loc_valid = 0; else rem_valid = 0;
      end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fork drive(0); drive(1); join
    repeat (100) @(negedge clk);
    check(exp_p[0] == NP && exp_p[1] == NP, "all packets delivered");
    check(int'(n_local) == NP && int'(n_remote) == NP, "counters");
    check(switches > NP / 2, "inputs alternate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
