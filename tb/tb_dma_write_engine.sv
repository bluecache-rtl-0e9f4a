// tb_dma_write_engine: response packets (random lengths) are fed to the
// engine with gaps; host writes are accepted with random back-pressure.
// Software takes each interrupt, reads the segment's words and frees the
// segment after a random delay; with only 4 segments the engine must stall
// while all segments are held.  Checks: the words read from the interrupted
// segments, in interrupt order, are exactly the input stream; interrupts
// come in circular segment order; full segments report SEG_WORDS words;
// idle gaps longer than FLUSH_IDLE produce early (partial) interrupts and
// the stall on unreleased segments happened.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_dma_write_engine;
  import bc_pkg::*;
  localparam int SG = 4, SW = 32, FI = 40;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, hw_valid, hw_ready = 0, irq_valid, seg_free_valid = 0;
  net_flit_t in = '0;
  logic [63:0] hw_addr, hw_data;
  logic [1:0] irq_idx, seg_free_idx = 0;
  logic [5:0] irq_words;
  logic [31:0] n_early_flush;
  int checks = 0, failures = 0;
  dma_write_engine #(.SEGMENTS(SG), .SEG_WORDS(SW), .FLUSH_IDLE(FI)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [63:0] mem [int];
  logic [63:0] sent [$];
  int irq_i [$], irq_w [$];
  int next_irq = 0, got = 0, stalls = 0, partial = 0;
  always @(posedge clk) begin
    hw_ready <= $urandom_range(0, 4) != 0;
    if (hw_valid && hw_ready) mem[int'(hw_addr >> 3)] = hw_data;
    if (irq_valid) begin irq_i.push_back(int'(irq_idx)); irq_w.push_back(int'(irq_words)); end
    if (in_valid && !in_ready && !hw_valid) stalls++;
  end

  // software
  initial begin
    forever begin
      @(negedge clk);
      if (irq_i.size() > 0) begin
        int s, w;
        s = irq_i.pop_front(); w = irq_w.pop_front();
        check(s == next_irq, "circular interrupt order");
        next_irq = (next_irq + 1) % SG;
        if (w < SW) partial++;
        for (int i = 0; i < w; i++) begin
          check(sent.size() > 0 && mem[s * SW + i] == sent[0], $sformatf("word %0d", got));
          if (sent.size() > 0) void'(sent.pop_front());
          got++;
        end
        repeat ($urandom_range(0, 150)) @(negedge clk);
        seg_free_valid = 1; seg_free_idx = 2'(s);
        @(negedge clk); seg_free_valid = 0;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 120; p++) begin
      int len;
      len = $urandom_range(3, 20);
      for (int i = 0; i < len; i++) begin
        in_valid = 1; in.data = {32'(p), 32'(i)}; in.last = (i == len - 1);
        do @(posedge clk); while (!in_ready);
        sent.push_back(in.data);
        @(negedge clk); in_valid = 0;
      end
      if ($urandom_range(0, 9) == 0) repeat (FI + 20) @(negedge clk);
    end
    repeat (FI * 3 + 400) @(negedge clk);
    check(sent.size() == 0, $sformatf("all words delivered (%0d left)", sent.size()));
    check(partial > 0 && n_early_flush > 0, "early flush of a partial segment");
    check(stalls > 0, "stall while all segments held by software");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
