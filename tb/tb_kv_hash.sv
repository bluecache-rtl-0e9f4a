// tb_kv_hash: feeds keys of many lengths (0..255 bytes) through kv_hash and
// compares both hashes with byte-loop reference models; also checks that a
// key of n bytes finishes ceil(n/8)+1 cycles after its first word.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_kv_hash;
  import bc_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, busy, done;
  logic [7:0] klen = 0;
  logic [63:0] in_word = 0;
  logic [31:0] jhash;
  logic [26:0] hkey;
  int checks = 0, failures = 0;

  kv_hash dut (.*);

  task automatic run(bytes_t k);
    words_t w = pack_bytes(k);
    int t0, t1;
    @(negedge clk); start = 1; klen = 8'(k.size());
    @(negedge clk); start = 0;
    t0 = $time;
    foreach (w[i]) begin
      in_valid = 1; in_word = w[i];
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); in_valid = 1; end
      @(negedge clk);
    end
    in_valid = 0; in_word = '1;
    while (!done) @(negedge clk);
    checks += 2;
    if (jhash !== ref_jhash(k)) begin failures++; $display("jhash mismatch len %0d: %h vs %h", k.size(), jhash, ref_jhash(k)); end
    if (hkey !== ref_hkey(k)) begin failures++; $display("hkey mismatch len %0d", k.size()); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) run(make_key(n * 5 + 1, n));
    for (int n = 0; n < 20; n++) run(make_key(n, $urandom_range(1, 255)));
    run(make_key(9, 255));
    // latency check: 16-byte key without gaps -> done 3 cycles after first word
    begin
      bytes_t k = make_key(3, 16);
      words_t w = pack_bytes(k);
      int c = 0;
      @(negedge clk); start = 1; klen = 16;
      @(negedge clk); start = 0;
      in_valid = 1; in_word = w[0]; @(negedge clk); c++;
      in_word = w[1]; @(negedge clk); c++; in_valid = 0;
      while (!done) begin @(negedge clk); c++; end
      checks++;
      if (c != 3) begin failures++; $display("latency %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
