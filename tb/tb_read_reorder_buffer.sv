// tb_read_reorder_buffer: allocates tags in order, returns the pages of
// several allocated tags interleaved in random order (the lines of one
// page in order, as a flash bus delivers them) and checks that the output
// is every page in allocation order with out_last on each page's final
// line, under random output back-pressure; also that allocation stalls
// when all tags are in flight.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_read_reorder_buffer;
  import bc_pkg::*;
  localparam int TG = 8, LN = 4;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic alloc_valid = 0, alloc_ready, in_valid = 0, out_valid, out_ready = 0, out_last;
  logic [FTAG_W-1:0] alloc_tag;
  flash_rdata_t in_data = '0;
  line_t out_data;
  int checks = 0, failures = 0;
  read_reorder_buffer #(.TAGS(TG), .LINES(LN)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int issued [$];        // page ids in allocation order
  int tag_page [int];
  int inflight [$];      // tags whose data is not yet returned
  int page_id = 0, exp_page = 0, exp_line = 0;
  localparam int PAGES = 200;

  // output checker with random back-pressure
  always @(posedge clk) begin
    out_ready <= $urandom_range(0, 2) != 0;
    if (out_valid && out_ready) begin
      check(out_data == line_t'({32'(exp_page), 32'(exp_line)}), $sformatf("line %0d.%0d got %h", exp_page, exp_line, out_data[63:0]));
      check(out_last == (exp_line == LN - 1), "out_last");
      if (exp_line == LN - 1) begin exp_line = 0; exp_page++; end else exp_line++;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    while (page_id < PAGES || inflight.size() > 0) begin
      @(negedge clk);
      in_valid = 0; alloc_valid = 0;
      if (page_id < PAGES && $urandom_range(0, 1)) begin
        alloc_valid = 1; #1;
        if (inflight.size() >= TG) check(!alloc_ready, "alloc stalls when all tags in flight");
        if (alloc_ready) begin
          tag_page[int'(alloc_tag)] = page_id++;
          inflight.push_back(int'(alloc_tag));
        end
        @(negedge clk); alloc_valid = 0;
      end
      if (inflight.size() > 0 && $urandom_range(0, 2) == 0) begin
        int k, t;
        k = $urandom_range(0, inflight.size() - 1);
        t = inflight[k];
        inflight.delete(k);
        for (int l = 0; l < LN; l++) begin
          in_valid = 1; in_data.tag = FTAG_W'(t); in_data.last = (l == LN - 1);
          in_data.data = line_t'({32'(tag_page[t]), 32'(l)});
          @(negedge clk);
        end
        in_valid = 0;
      end
    end
    repeat (200) @(negedge clk);
    check(exp_page == PAGES, $sformatf("all pages out (%0d)", exp_page));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
