// tb_bad_block_list: inserts bad blocks on random chips and checks the
// remapping against a reference map: unmapped blocks translate to
// themselves, each bad block gets the chip's next spare (LOG_BLOCKS + n),
// a spare that goes bad is remapped again, and inserts are refused when
// the list (ENTRIES) or a chip's spares (SPARES) are exhausted.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_bad_block_list;
  import bc_pkg::*;
  localparam int ENT = 16, LB = 100, SP = 3;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [6:0] lk_chip = 0, ins_chip = 0;
  logic [BLOCK_W-1:0] lk_block = 0, ins_block = 0, lk_phys, ins_phys;
  logic ins_valid = 0, ins_ok;
  logic [$clog2(ENT+1)-1:0] num_bad;
  int checks = 0, failures = 0;
  bad_block_list #(.ENTRIES(ENT), .LOG_BLOCKS(LB), .SPARES(SP)) dut (.*);

  int map [int];        // {chip,block} -> physical
  int used [int];       // chip -> spares used

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int c, b, key, expect_phys;
      bit exp_ok;
      c = $urandom_range(0, 3); b = $urandom_range(0, 9);
      key = c * 4096 + b;
      exp_ok = (!used.exists(c) || used[c] < SP) && (map.exists(key) || map.size() < ENT);
      expect_phys = LB + (used.exists(c) ? used[c] : 0);
      @(negedge clk);
      ins_valid = 1; ins_chip = 7'(c); ins_block = BLOCK_W'(b);
      #1;
      check(ins_ok == exp_ok, $sformatf("ins_ok chip %0d block %0d", c, b));
      if (exp_ok) check(int'(ins_phys) == expect_phys, "spare choice");
      @(negedge clk); ins_valid = 0;
      if (exp_ok) begin map[key] = expect_phys; used[c] = (used.exists(c) ? used[c] : 0) + 1; end
      check(int'(num_bad) == map.size(), $sformatf("num_bad %0d vs %0d ok=%0d phys=%0d", num_bad, map.size(), exp_ok, ins_phys));
      for (int q = 0; q < 8; q++) begin
        int qc, qb, qk;
        qc = $urandom_range(0, 3); qb = $urandom_range(0, 11); qk = qc * 4096 + qb;
        lk_chip = 7'(qc); lk_block = BLOCK_W'(qb); #1;
        check(int'(lk_phys) == (map.exists(qk) ? map[qk] : qb), $sformatf("lookup %0d/%0d -> %0d", qc, qb, lk_phys));
      end
    end
    check(map.size() > 0, "some blocks remapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
