// tb_completion_buffer: allocates entries until the buffer is full (alloc
// must then stall), writes metadata and key words per entry, frees entries
// in random order and checks that the free list hands out every index once,
// that the metadata and keys read back through both read ports are intact,
// and that in_use follows allocations and frees.
module tb_completion_buffer;
  import bc_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic alloc_valid = 0, alloc_ready, kw_valid = 0, free_valid = 0;
  logic [CIDX_W-1:0] alloc_idx, kw_idx = 0, ra_idx = 0, rb_idx = 0, free_idx = 0;
  cb_meta_t alloc_meta = '0, rb_meta;
  logic [4:0] kw_sel = 0, ra_sel = 0, rb_sel = 0;
  logic [63:0] kw_data = 0, ra_key, rb_key;
  logic [CIDX_W:0] in_use;
  int checks = 0, failures = 0;
  completion_buffer #(.ENTRIES(E)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int live [$];
  cb_meta_t m [int];
  task automatic alloc_one();
    cb_meta_t x;
    int idx;
    x.opcode = 8'($urandom); x.opaque = $urandom; x.klen = 8'($urandom); x.src = NODE_W'($urandom);
    @(negedge clk); alloc_valid = 1; alloc_meta = x;
    #1 check(alloc_ready, "alloc ready");
    idx = int'(alloc_idx);
    foreach (live[i]) check(live[i] != idx, "index handed out twice");
    @(negedge clk); alloc_valid = 0;
    live.push_back(idx); m[idx] = x;
    for (int s = 0; s < 32; s += 7) begin
      kw_valid = 1; kw_idx = CIDX_W'(idx); kw_sel = 5'(s); kw_data = {32'(idx), 32'(s)};
      @(negedge clk);
    end
    kw_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      while (live.size() < E) alloc_one();
      @(negedge clk); alloc_valid = 1; #1 check(!alloc_ready, "full buffer stalls"); @(negedge clk); alloc_valid = 0;
      check(int'(in_use) == E, "in_use full");
      foreach (live[i]) begin
        rb_idx = CIDX_W'(live[i]); ra_idx = CIDX_W'(live[i]);
        for (int s = 0; s < 32; s += 7) begin
          rb_sel = 5'(s); ra_sel = 5'(s); #1;
          check(rb_key == {32'(live[i]), 32'(s)} && ra_key == rb_key, "key read back");
        end
        check(rb_meta == m[live[i]], "meta read back");
      end
      repeat ($urandom_range(1, E)) begin
        int k;
        k = $urandom_range(0, live.size() - 1);
        @(negedge clk); free_valid = 1; free_idx = CIDX_W'(live[k]);
        @(negedge clk); free_valid = 0;
        live.delete(k);
      end
      @(negedge clk);
      check(int'(in_use) == live.size(), "in_use after free");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
