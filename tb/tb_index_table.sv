// tb_index_table: drives the 4-way index table against a DRAM model.
// Checks: insert/lookup hits and misses, matching on {key length, hashed
// key}, filling all four ways of one bucket, eviction of the entry with the
// oldest timestamp (after a lookup refreshed another one), delete, and the
// back-trace pointer update that only applies when the old pointer matches.
// Also a random phase against a reference model of the bucket contents.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_index_table;
  import bc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [31:0] now;
  logic cmd_valid = 0, cmd_ready, resp_valid, resp_hit, resp_old_valid;
  logic [1:0] cmd_op = 0;
  logic [31:0] cmd_jhash = 0;
  index_entry_t cmd_entry = '0, resp_entry;
  logic [40:0] cmd_old_ptr = 0;
  logic dram_req_valid, dram_req_ready, dram_resp_valid;
  dram_req_t dram_req;
  line_t dram_resp_data;
  int checks = 0, failures = 0;

  index_table #(.INDEX_BITS(10)) dut (.clk, .rst_n, .now, .cmd_valid, .cmd_ready, .cmd_op, .cmd_jhash,
    .cmd_entry, .cmd_old_ptr, .resp_valid, .resp_ready(1'b1), .resp_hit, .resp_entry, .resp_old_valid,
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_resp_valid, .dram_resp_data);
  dram_model u_dram (.clk, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
                     .resp_valid(dram_resp_valid), .resp_data(dram_resp_data));

  always_ff @(posedge clk) now <= rst_n ? now + 1 : 32'd100;

  task automatic op(input logic [1:0] o, input logic [31:0] h, input logic [7:0] kl, input logic [26:0] hk,
                    input logic [40:0] ptr, input logic [40:0] oldp);
    @(negedge clk);
    cmd_valid = 1; cmd_op = o; cmd_jhash = h; cmd_old_ptr = oldp;
    cmd_entry = '{timestamp: 0, hkey: hk, klen: kl, vlen: 20'(kl) * 3, ptr: ptr};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
  endtask

  task automatic expect_hit(input bit exp, input logic [40:0] ptr, input string what);
    checks++;
    if (resp_hit !== exp || (exp && ptr != '1 && resp_entry.ptr !== ptr)) begin
      failures++; $display("FAIL %s: hit=%0d ptr=%h", what, resp_hit, resp_entry.ptr);
    end
  endtask

  // reference model for the random phase: bucket -> list of {klen,hkey,ptr}
  typedef struct { logic [7:0] kl; logic [26:0] hk; logic [40:0] p; } ref_t;
  ref_t refm [int][$];

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    op(0, 32'h5, 8'd10, 27'h111, 0, 0); expect_hit(0, '1, "empty lookup");
    for (int i = 0; i < 4; i++) begin
      op(1, 32'h5, 8'd10 + 8'(i), 27'h111 + 27'(i), 41'(100 + i), 0);
      checks++; if (resp_old_valid) begin failures++; $display("FAIL insert %0d evicted", i); end
    end
    for (int i = 0; i < 4; i++) begin op(0, 32'h5, 8'd10 + 8'(i), 27'h111 + 27'(i), 0, 0); expect_hit(1, 41'(100 + i), "lookup way"); end
    op(0, 32'h5, 8'd11, 27'h111, 0, 0); expect_hit(0, '1, "klen differs");
    op(0, 32'h405, 8'd10, 27'h111, 0, 0); expect_hit(1, 41'd100, "bits above INDEX_BITS ignored");
    op(0, 32'h6, 8'd10, 27'h111, 0, 0); expect_hit(0, '1, "other bucket");
    // refresh entry 0, so entry 1 is now oldest -> evicted by a fifth insert
    op(0, 32'h5, 8'd10, 27'h111, 0, 0);
    op(1, 32'h5, 8'd50, 27'h999, 41'd555, 0);
    checks++; if (!resp_old_valid || resp_entry.klen != 8'd11) begin failures++; $display("FAIL eviction chose klen %0d", resp_entry.klen); end
    op(0, 32'h5, 8'd11, 27'h112, 0, 0); expect_hit(0, '1, "evicted entry gone");
    op(0, 32'h5, 8'd50, 27'h999, 0, 0); expect_hit(1, 41'd555, "new entry");
    // re-insert same key overwrites in place
    op(1, 32'h5, 8'd50, 27'h999, 41'd777, 0);
    checks++; if (!resp_hit) begin failures++; $display("FAIL overwrite not matched"); end
    op(0, 32'h5, 8'd50, 27'h999, 0, 0); expect_hit(1, 41'd777, "overwrite");
    // update with wrong / right old pointer
    op(3, 32'h5, 8'd50, 27'h999, {1'b1, 40'h12345}, 41'd1); expect_hit(0, '1, "update wrong old ptr");
    op(3, 32'h5, 8'd50, 27'h999, {1'b1, 40'h12345}, 41'd777); expect_hit(1, '1, "update");
    op(0, 32'h5, 8'd50, 27'h999, 0, 0); expect_hit(1, {1'b1, 40'h12345}, "updated ptr");
    // delete
    op(2, 32'h5, 8'd12, 27'h113, 0, 0); expect_hit(1, '1, "delete");
    op(0, 32'h5, 8'd12, 27'h113, 0, 0); expect_hit(0, '1, "deleted gone");
    op(2, 32'h5, 8'd12, 27'h113, 0, 0); expect_hit(0, '1, "delete missing");
    // random phase: few keys per bucket (<= 4) so nothing is evicted
    for (int n = 0; n < 300; n++) begin
      int b, k, r, found;
      logic [26:0] hk;
      b = $urandom_range(20, 27); k = $urandom_range(1, 4); r = $urandom_range(0, 2);
      hk = 27'(b * 16 + k); found = -1;
      foreach (refm[b][i]) if (refm[b][i].hk == hk) found = i;
      if (r == 0) begin
        logic [40:0] p;
        p = 41'($urandom);
        op(1, 32'(b), 8'(k), hk, p, 0);
        if (found >= 0) refm[b][found].p = p; else refm[b].push_back('{kl: 8'(k), hk: hk, p: p});
      end else if (r == 1) begin
        op(0, 32'(b), 8'(k), hk, 0, 0);
        expect_hit(found >= 0, found >= 0 ? refm[b][found].p : '1, "random lookup");
      end else begin
        op(2, 32'(b), 8'(k), hk, 0, 0);
        expect_hit(found >= 0, '1, "random delete");
        if (found >= 0) refm[b].delete(found);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
