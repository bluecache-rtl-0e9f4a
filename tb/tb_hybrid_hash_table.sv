// tb_hybrid_hash_table: the hybrid-memory hash table with DRAM and flash
// models, small slab regions (REGION_BITS 8) and a 2^10-bucket index.
// Objects are key||value byte strings; SETs store them, GETs must return
// exactly the stored bytes (from a DRAM slot, the flash write buffer or
// flash pages) and DELETEs remove them.  Phases: SET 40 small and 12
// large (8000-byte) objects, GET all, flush_req and wait for the chunk to
// reach flash, GET all again, DELETE every third key and GET all.  The
// responses (hit, lengths, completion index) and the object words are
// checked; eviction, write-buffer read, flush and flash read must occur.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_hybrid_hash_table;
  import bc_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid = 0, cmd_ready, in_valid = 0, in_ready, resp_valid, resp_ready = 1, out_valid, out_ready = 0, out_last;
  ht_cmd_t cmd = '0; ht_resp_t resp;
  logic [63:0] in_word = 0, out_word;
  logic flush_req = 0;
  logic dram_req_valid, dram_req_ready, dram_resp_valid; dram_req_t dram_req; line_t dram_resp_data;
  logic fcmd_valid, fcmd_ready, fwdata_valid, fwdata_ready, frdata_valid, fack_valid;
  flash_cmd_t fcmd; line_t fwdata; flash_rdata_t frdata; flash_erase_ack_t fack;
  logic [31:0] n_evictions, n_flash_reads, n_wb_reads, n_chunks_flushed, n_blocks_erased;

  hybrid_hash_table #(.INDEX_BITS(10), .NUM_CLASSES(8), .REGION_BITS(8)) dut (.*);
  dram_model u_dram (.clk, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
                     .resp_valid(dram_resp_valid), .resp_data(dram_resp_data));
  flash_model u_flash (.clk, .cmd_valid(fcmd_valid), .cmd_ready(fcmd_ready), .cmd(fcmd),
    .wdata_valid(fwdata_valid), .wdata_ready(fwdata_ready), .wdata(fwdata),
    .rdata_valid(frdata_valid), .rdata(frdata), .ack_valid(fack_valid), .ack(fack));

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  bytes_t key [int], val [int];
  bit live [int];
  always @(posedge clk) out_ready <= $urandom_range(0, 3) != 0;

  task automatic do_cmd(ht_op_e op, int id);
    ht_cmd_t c;
    words_t w;
    bytes_t obj;
    int cidx;
    obj = key[id];
    if (op == HT_SET) foreach (val[id][i]) obj.push_back(val[id][i]);
    w = pack_bytes(obj);
    cidx = $urandom_range(0, 127);
    c = '0; c.op = op; c.klen = 8'(key[id].size()); c.vlen = (op == HT_SET) ? 20'(val[id].size()) : '0;
    c.jhash = ref_jhash(key[id]); c.hkey = ref_hkey(key[id]); c.cidx = CIDX_W'(cidx);
    @(negedge clk); cmd_valid = 1; cmd = c;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    if (op == HT_SET)
      foreach (w[i]) begin
        in_valid = 1; in_word = w[i];
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
    while (!resp_valid) @(negedge clk);
    check(resp.op == op && int'(resp.cidx) == cidx, "response op / completion index");
    if (op == HT_SET) begin check(resp.hit, "SET stored"); live[id] = 1; end
    else if (op == HT_DEL) begin check(resp.hit == live[id], "DELETE hit"); live[id] = 0; end
    else begin
      check(resp.hit == live[id], $sformatf("GET hit key %0d", id));
      if (resp.hit) begin
        words_t e;
        bytes_t eo;
        int k;
        eo = key[id]; foreach (val[id][i]) eo.push_back(val[id][i]);
        e = pack_bytes(eo);
        check(int'(resp.klen) == key[id].size() && int'(resp.vlen) == val[id].size(), "GET lengths");
        k = 0;
        @(negedge clk);
        while (k < e.size()) begin
          @(posedge clk);
          if (out_valid && out_ready) begin
            check(out_word == e[k] && out_last == (k == e.size() - 1), $sformatf("key %0d word %0d", id, k));
            k++;
          end
        end
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int ids [$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 52; i++) begin
      key[i] = make_key(i, 5 + i % 40);
      val[i] = make_val(i, (i < 40) ? 1 + (i * 7) % 90 : 8000);
      live[i] = 0;
      ids.push_back(i);
    end
    ids.shuffle();
    foreach (ids[i]) do_cmd(HT_SET, ids[i]);
    foreach (ids[i]) do_cmd(HT_GET, ids[i]);
    @(negedge clk); flush_req = 1; @(negedge clk); flush_req = 0;
    while (n_chunks_flushed == 0) @(negedge clk);
    foreach (ids[i]) do_cmd(HT_GET, ids[i]);
    foreach (ids[i]) if (ids[i] % 3 == 0) do_cmd(HT_DEL, ids[i]);
    foreach (ids[i]) do_cmd(HT_GET, ids[i]);
    check(n_evictions > 0 && n_wb_reads > 0 && n_chunks_flushed > 0 && n_flash_reads > 0,
          $sformatf("mechanisms evict=%0d wb=%0d flush=%0d flash=%0d", n_evictions, n_wb_reads, n_chunks_flushed, n_flash_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
