// tb_slab_allocator: 4 classes (2, 4, 8, 16 lines) with regions of 16
// lines, so classes fill after 8, 4, 2 and 1 allocations.  For every
// request the testbench writes a slot header with an increasing timestamp
// into the allocated slot (as the hash table does).  Checks: the class is
// the smallest that fits and oversize objects are refused; fresh slots are
// distinct, aligned and inside the class region; once a region is full the
// answer is an eviction of a slot of that class whose reported victim
// header equals the header stored there; over many evictions the victim is
// on average older than a randomly chosen slot (approximate LRU).
module tb_slab_allocator;
  import bc_pkg::*;
  localparam int NC = 4, RB = 4;
  localparam dram_addr_t BASE = dram_addr_t'(1) << 25;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic req_valid = 0, req_ready, resp_valid, resp_ready = 0, resp_evict, resp_fit;
  logic [17:0] req_lines = 0;
  dram_addr_t resp_addr;
  logic [4:0] resp_class;
  slot_hdr_t resp_victim;
  logic dram_req_valid, dram_req_ready, dram_resp_valid;
  dram_req_t dram_req;
  line_t dram_resp_data;
  int checks = 0, failures = 0;
  slab_allocator #(.NUM_CLASSES(NC), .REGION_BITS(RB)) dut (.*);
  dram_model u_dram (.clk, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
                     .resp_valid(dram_resp_valid), .resp_data(dram_resp_data));

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int used [NC];
  int ts_of [dram_addr_t];
  int ts = 1, evictions = 0;
  longint age_victim = 0, age_avg = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < NC; c++) used[c] = 0;
    for (int n = 0; n < 400; n++) begin
      int lines, c;
      bit fit;
      lines = $urandom_range(1, 18);
      fit = 0; c = 0;
      for (int k = NC - 1; k >= 0; k--) if ((2 << k) >= lines) begin c = k; fit = 1; end
      @(negedge clk); req_valid = 1; req_lines = 18'(lines);
      do @(posedge clk); while (!req_ready);
      @(negedge clk); req_valid = 0; resp_ready = 1;
      while (!resp_valid) @(negedge clk);
      check(resp_fit == fit, "fit");
      if (fit) begin
        dram_addr_t region;
        region = BASE + (dram_addr_t'(c) << RB);
        check(int'(resp_class) == c, $sformatf("class for %0d lines", lines));
        check(resp_addr >= region && resp_addr < region + (1 << RB) && ((resp_addr - region) % (2 << c)) == 0, "slot inside region and aligned");
        if (used[c] < (1 << RB) / (2 << c)) begin
          check(!resp_evict && !ts_of.exists(resp_addr), "fresh slot");
          used[c]++;
        end else begin
          slot_hdr_t h;
          longint sum;
          check(resp_evict, "eviction when region full");
          h = u_dram.mem[resp_addr];
          check(resp_victim == h && int'(h.timestamp) == ts_of[resp_addr], "victim header");
          evictions++;
          age_victim += ts - ts_of[resp_addr];
          sum = 0;
          foreach (ts_of[a]) if (a >= region && a < region + (1 << RB)) sum += ts - ts_of[a];
          age_avg += sum / ((1 << RB) / (2 << c));
        end
        begin
          slot_hdr_t h;
          h = '0; h.timestamp = TS_W'(ts); h.jhash = 32'(n); h.klen = 8'(lines);
          u_dram.mem[resp_addr] = line_t'(h);
          ts_of[resp_addr] = ts++;
        end
      end
      @(negedge clk); resp_ready = 0;
    end
    check(evictions > 100, "evictions happened");
    check(age_victim > age_avg, $sformatf("victims older than average (%0d vs %0d)", age_victim, age_avg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
