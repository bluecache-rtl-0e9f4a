// tb_flash_log_manager: the log manager with a DRAM model (write buffers)
// and the flash model (one chip has a block whose first erase fails).
// Objects of random size are appended; the testbench writes their lines
// into the DRAM lines it is given.  Checks during appends: flash addresses
// are consecutive within the open chunk and the write-buffer lookup hits.
// flush_req seals the buffer; the first chunk erases block 0 on every chip
// (128 erases plus the spare after the bad erase, which enters the bad
// block list) and writes 128 pages.  A second chunk is filled past its end
// so that it seals by itself.  Afterwards every object is read back page by
// page through the read port (through the bad-block remap) and compared
// line by line; the lookup of flushed chunks must miss.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_flash_log_manager;
  import bc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic app_valid = 0, app_ready, flush_req = 0, lk_hit, rd_valid = 0, rd_ready;
  logic [14:0] app_lines = 0;
  logic [FLASH_AW-1:0] app_flash_addr;
  dram_addr_t app_dram_addr, lk_dram_base;
  logic [19:0] lk_chunk = 0, rd_chunk = 0;
  logic [6:0] rd_page = 0;
  logic [FTAG_W-1:0] rd_tag = 0;
  logic fcmd_valid, fcmd_ready, fwdata_valid, fwdata_ready, frdata_valid, fack_valid;
  flash_cmd_t fcmd; line_t fwdata; flash_rdata_t frdata; flash_erase_ack_t fack;
  logic dram_req_valid, dram_req_ready, dram_resp_valid;
  dram_req_t dram_req; line_t dram_resp_data;
  logic [31:0] chunks_flushed, blocks_erased, log_wraps;
  logic [6:0] bad_blocks;

  flash_log_manager #(.LOG_BLOCKS(100)) dut (.clk, .rst_n, .app_valid, .app_ready, .app_lines, .app_flash_addr,
    .app_dram_addr, .flush_req, .lk_chunk, .lk_hit, .lk_dram_base, .rd_valid, .rd_ready, .rd_chunk, .rd_page,
    .rd_tag, .fcmd_valid, .fcmd_ready, .fcmd, .fwdata_valid, .fwdata_ready, .fwdata,
    .fack_valid, .fack, .dram_req_valid, .dram_req_ready, .dram_req, .dram_resp_valid, .dram_resp_data,
    .chunks_flushed, .blocks_erased, .log_wraps, .bad_blocks);
  dram_model u_dram (.clk, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
                     .resp_valid(dram_resp_valid), .resp_data(dram_resp_data));
  flash_model u_flash (.clk, .cmd_valid(fcmd_valid), .cmd_ready(fcmd_ready), .cmd(fcmd),
    .wdata_valid(fwdata_valid), .wdata_ready(fwdata_ready), .wdata(fwdata),
    .rdata_valid(frdata_valid), .rdata(frdata), .ack_valid(fack_valid), .ack(fack));

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  typedef struct { logic [FLASH_AW-1:0] fa; int lines; int id; } obj_t;
  obj_t objs [$];
  logic [FLASH_AW-1:0] last_end = 0;

  function automatic line_t pattern(int id, int l); return line_t'({32'(id), 32'(l), 64'hC0FFEE}); endfunction

  task automatic append(int id, int lines);
    obj_t o;
    @(negedge clk); app_valid = 1; app_lines = 15'(lines);
    do @(posedge clk); while (!app_ready);
    o.fa = app_flash_addr; o.lines = lines; o.id = id;
    for (int l = 0; l < lines; l++) u_dram.mem[app_dram_addr + dram_addr_t'(l)] = pattern(id, l);
    @(negedge clk); app_valid = 0;
    if (o.fa[39:20] == last_end[39:20]) check(o.fa == last_end, "consecutive addresses in a chunk");
    else check(o.fa[19:0] == 0, "new chunk starts at offset 0");
    last_end = o.fa + FLASH_AW'(64 * lines);
    lk_chunk = o.fa[39:20]; #1 check(lk_hit, "write-buffer lookup hits");
    objs.push_back(o);
  endtask

  // collect read data per tag
  line_t got [int][$];
  always @(posedge clk) if (frdata_valid) got[int'(frdata.tag)].push_back(frdata.data);

  initial begin
    int id;
    repeat (2) @(negedge clk); rst_n = 1;
    id = 0;
    repeat (5) begin append(id, $urandom_range(1, 300)); id++; end
    @(negedge clk); flush_req = 1; @(negedge clk); flush_req = 0;
    // second chunk: fill until it seals on its own
    while (chunks_flushed < 2 && id < 400) begin append(id, $urandom_range(50, 300)); id++; end
    while (chunks_flushed < 2) @(negedge clk);
    check(blocks_erased == 1, $sformatf("erase rounds %0d", blocks_erased));
    check(bad_blocks == 1, "bad block recorded");
    check(u_flash.n_erases == NUM_BUS * CHIPS_PER_BUS + 1, "erase commands");
    // read back every object in the two flushed chunks
    foreach (objs[k]) begin
      int first, lastl;
      if (objs[k].fa[39:20] > 1) continue;
      lk_chunk = objs[k].fa[39:20]; #1 check(!lk_hit, "lookup misses after flush");
      first = int'(objs[k].fa[19:6]); lastl = first + objs[k].lines - 1;
      for (int p = first / 128; p <= lastl / 128; p++) begin
        int tag;
        tag = (k * 7 + p) % 64;
        got.delete(tag);
        @(negedge clk); rd_valid = 1; rd_chunk = objs[k].fa[39:20]; rd_page = 7'(p); rd_tag = FTAG_W'(tag);
        do @(posedge clk); while (!rd_ready);
        @(negedge clk); rd_valid = 0;
        while (!got.exists(tag) || got[tag].size() < 128) @(negedge clk);
        for (int l = 0; l < 128; l++) begin
          int ol;
          ol = p * 128 + l - first;
          if (ol >= 0 && ol < objs[k].lines) check(got[tag][l] == pattern(objs[k].id, ol), $sformatf("object %0d line %0d", objs[k].id, ol));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
