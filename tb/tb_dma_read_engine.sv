// tb_dma_read_engine: software posts segments (SEGMENTS 8, SEG_WORDS 64)
// holding a continuous stream of memcached packets; packets are cut at
// arbitrary segment boundaries and segments are posted partly filled.
// The host memory answers read bursts in order with random gaps.
// Checks: the output word stream equals the posted stream, `last` marks
// exactly the final word of each packet, bursts never exceed BURST words
// and never cross the posted word count, and every segment is acknowledged
// once, in order.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_dma_read_engine;
  import bc_pkg::*;
  import tb_pkg::*;
  localparam int SG = 8, SW = 64, BR = 16;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic seg_valid = 0, seg_ready, ack_valid, hr_valid, hr_ready = 0, hd_valid = 0, out_valid, out_ready = 0;
  logic [2:0] seg_idx = 0, ack_idx;
  logic [6:0] seg_words = 0;
  logic [63:0] hr_addr, hd_data = 0;
  logic [7:0] hr_words;
  net_flit_t out;
  int checks = 0, failures = 0;
  dma_read_engine #(.SEGMENTS(SG), .SEG_WORDS(SW), .BURST(BR)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [63:0] mem [int];
  words_t stream;           // expected words
  bit     lastq [$];        // expected last flags
  int     posted [$];       // posted segment indices (ack order)
  int     seg_w [SG];
  logic [63:0] rdq [$];
  int     outs = 0, acks = 0;

  always @(posedge clk) begin
    hr_ready <= $urandom_range(0, 2) != 0;
    if (hr_valid && hr_ready) begin
      int s, off;
      s = int'(hr_addr / (SW * 8)); off = int'(hr_addr % (SW * 8)) / 8;
      check(hr_words != 0 && int'(hr_words) <= BR && off + int'(hr_words) <= seg_w[s], "burst size");
      for (int i = 0; i < int'(hr_words); i++) rdq.push_back(hr_addr + 64'(8 * i));
    end
    hd_valid <= 1'b0;
    if (rdq.size() > 0 && $urandom_range(0, 3) != 0) begin
      logic [63:0] a;
      a = rdq.pop_front();
      hd_valid <= 1'b1; hd_data <= mem[int'(a >> 3)];
    end
    out_ready <= $urandom_range(0, 3) != 0;
    if (out_valid && out_ready) begin
      check(stream.size() > 0 && out.data == stream[0] && out.last == lastq[0], $sformatf("word %0d", outs));
      if (stream.size() > 0) begin void'(stream.pop_front()); void'(lastq.pop_front()); end
      outs++;
    end
    if (ack_valid) begin
      check(posted.size() > 0 && int'(ack_idx) == posted[0], "ack order");
      if (posted.size() > 0) void'(posted.pop_front());
      acks++;
    end
  end

  initial begin
    words_t all;
    int seg, nsegs;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      words_t w;
      w = build_req(8'h01, make_key(p, 4 + p % 20), make_val(p, (p * 37) % 300), 32'(p));
      foreach (w[i]) begin all.push_back(w[i]); stream.push_back(w[i]); lastq.push_back(i == w.size() - 1); end
    end
    seg = 0; nsegs = 0;
    while (all.size() > 0) begin
      int w;
      while (posted.size() >= SG) @(negedge clk);
      w = $urandom_range(1, SW);
      if (w > all.size()) w = all.size();
      for (int i = 0; i < w; i++) mem[seg * SW + i] = all.pop_front();
      seg_w[seg] = w;
      @(negedge clk);
      seg_valid = 1; seg_idx = 3'(seg); seg_words = 7'(w);
      do @(posedge clk); while (!seg_ready);
      posted.push_back(seg);
      @(negedge clk); seg_valid = 0;
      seg = (seg + 1) % SG; nsegs++;
    end
    while (stream.size() > 0 || posted.size() > 0) @(negedge clk);
    check(acks == nsegs, "every segment acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
