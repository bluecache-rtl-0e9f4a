// tb_workload_kv_sizes: the single-node workload over key-value sizes.
//
// One node (its network links unused).  For each value size in SIZES the
// client stores NOBJ objects, GETs them back while they are in DRAM, then
// forces a flush of the flash write buffers and GETs them again.  The slab
// regions are small (REGION_BITS = 10, 64 KB per class), so large sizes
// evict earlier objects to flash and the second GET pass reads them from
// flash pages; small sizes stay in DRAM.  For every size the testbench
// prints cycles per SET and per GET and where the GETs were served, and it
// checks every response (status, key, value).  The workload it follows is
// SET and GET throughput on the DRAM and the flash store for a range of
// key-value sizes; the sizes (32 B to 32 KB) and object counts are reduced
// so the run takes seconds.  Host, DRAM and flash are the shared
// behavioural models.
module tb_workload_kv_sizes;
  import bc_pkg::*;
  import tb_pkg::*;
  localparam int NN = 1;
  localparam int NOBJ = 8;
  localparam int SIZES [6] = '{32, 128, 512, 2048, 8192, 32768};

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic              seg_valid [NN], seg_ready [NN];
  logic [6:0]        seg_idx [NN];
  logic [10:0]       seg_words [NN];
  logic              seg_ack_valid [NN];
  logic [6:0]        seg_ack_idx [NN];
  logic              hr_valid [NN], hr_ready [NN];
  logic [63:0]       hr_addr [NN];
  logic [7:0]        hr_words [NN];
  logic              hd_valid [NN];
  logic [63:0]       hd_data [NN];
  logic              hw_valid [NN], hw_ready [NN];
  logic [63:0]       hw_addr [NN], hw_data [NN];
  logic              irq_valid [NN];
  logic [6:0]        irq_idx [NN];
  logic [10:0]       irq_words [NN];
  logic              seg_free_valid [NN];
  logic [6:0]        seg_free_idx [NN];
  logic              dram_req_valid [NN], dram_req_ready [NN], dram_resp_valid [NN];
  dram_req_t         dram_req [NN];
  line_t             dram_resp_data [NN];
  logic              fcmd_valid [NN], fcmd_ready [NN];
  flash_cmd_t        fcmd [NN];
  logic              fwdata_valid [NN], fwdata_ready [NN];
  line_t             fwdata [NN];
  logic              frdata_valid [NN];
  flash_rdata_t      frdata [NN];
  logic              fack_valid [NN];
  flash_erase_ack_t  fack [NN];
  logic              flush_req [NN];
  logic [31:0]       ev [NN][16];

  bluecache_cluster #(.NUM_NODES(NN), .INDEX_BITS(10), .NUM_CLASSES(11), .REGION_BITS(10),
                      .FLUSH_IDLE(64)) dut (.*);

  int checks = 0, failures = 0;
  int n_dram_stall = 0, n_bad = 0, n_hw_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- reference state ----------------
  typedef struct { bytes_t key; bytes_t val; bit live; } kv_t;
  kv_t kv [int];                              // by key id
  typedef struct { byte unsigned op; int kid; bit exp_hit; bytes_t val; } pend_t;
  pend_t pend [int];                          // by opaque
  int seq = 0;
  int n_resp = 0;

  // ---------------- per-node host models ----------------
  logic [63:0] reqmem [NN][int];
  logic [63:0] rspmem [NN][int];
  words_t      txq [NN];                      // request words not yet posted
  int          next_seg [NN];
  int          acks_pending [NN];

  for (genvar n = 0; n < NN; n++) begin : g_host
    dram_model #(.LAT(6)) u_dram (.clk, .req_valid(dram_req_valid[n]), .req_ready(dram_req_ready[n]),
      .req(dram_req[n]), .resp_valid(dram_resp_valid[n]), .resp_data(dram_resp_data[n]));
    flash_model u_flash (.clk, .cmd_valid(fcmd_valid[n]), .cmd_ready(fcmd_ready[n]), .cmd(fcmd[n]),
      .wdata_valid(fwdata_valid[n]), .wdata_ready(fwdata_ready[n]), .wdata(fwdata[n]),
      .rdata_valid(frdata_valid[n]), .rdata(frdata[n]), .ack_valid(fack_valid[n]), .ack(fack[n]));

    // host memory reads for the DMA read engine: in order, random gaps
    logic [63:0] rdq [$];
    always @(posedge clk) begin
      hr_ready[n] <= ($urandom_range(0, 3) != 0);
      if (hr_valid[n] && hr_ready[n])
        for (int i = 0; i < int'(hr_words[n]); i++) rdq.push_back(hr_addr[n] + 64'(8 * i));
      hd_valid[n] <= 1'b0;
      if (rdq.size() > 0 && $urandom_range(0, 4) != 0) begin
        logic [63:0] a;
        a = rdq.pop_front();
        hd_valid[n] <= 1'b1;
        hd_data[n]  <= reqmem[n].exists(int'(a >> 3)) ? reqmem[n][int'(a >> 3)] : 64'hdead;
      end
      if (seg_ack_valid[n]) acks_pending[n]--;
    end

    // host memory writes for the DMA write engine, interrupts
    int irqq_idx [$], irqq_words [$];
    always @(posedge clk) begin
      hw_ready[n] <= ($urandom_range(0, 7) != 0);
      if (hw_valid[n] && !hw_ready[n]) n_hw_stall++;
      if (hw_valid[n] && hw_ready[n]) rspmem[n][int'(hw_addr[n] >> 3)] = hw_data[n];
      if (irq_valid[n]) begin irqq_idx.push_back(int'(irq_idx[n])); irqq_words.push_back(int'(irq_words[n])); end
      if (dram_req_valid[n] && !dram_req_ready[n]) n_dram_stall++;
      if (fack_valid[n] && fack[n].bad) n_bad++;
    end

    // response parser: segment words form one continuous packet stream
    words_t rxs;
    initial begin
      seg_free_valid[n] = 1'b0; seg_free_idx[n] = '0;
      forever begin
        @(negedge clk);
        if (irqq_idx.size() > 0) begin
          int idx, w;
          idx = irqq_idx.pop_front(); w = irqq_words.pop_front();
          for (int i = 0; i < w; i++) rxs.push_back(rspmem[n][idx * 1024 + i]);
          parse(rxs);
          repeat ($urandom_range(0, 20)) @(negedge clk);
          seg_free_valid[n] = 1'b1; seg_free_idx[n] = 7'(idx);
          @(negedge clk);
          seg_free_valid[n] = 1'b0;
        end
      end
    end

    // request poster: fills segments of up to 1024 words and posts them
    initial begin
      seg_valid[n] = 1'b0; seg_idx[n] = '0; seg_words[n] = '0;
      next_seg[n] = 0; acks_pending[n] = 0;
      forever begin
        @(negedge clk);
        if (txq[n].size() > 0 && acks_pending[n] < 100) begin
          int w;
          w = (txq[n].size() > 1024) ? 1024 : txq[n].size();
          if ($urandom_range(0, 1) && w > 40) w = $urandom_range(20, w);   // split posts
          for (int i = 0; i < w; i++) reqmem[n][next_seg[n] * 1024 + i] = txq[n].pop_front();
          seg_valid[n] = 1'b1; seg_idx[n] = 7'(next_seg[n]); seg_words[n] = 11'(w);
          do @(posedge clk); while (!seg_ready[n]);
          @(negedge clk); seg_valid[n] = 1'b0;
          acks_pending[n]++;
          next_seg[n] = (next_seg[n] + 1) % 128;
        end
      end
    end
  end

  function automatic bytes_t unpack(words_t ws, int from, int nbytes);
    bytes_t b;
    for (int i = 0; i < nbytes; i++) b.push_back(ws[from + i / 8][63 - 8 * (i % 8) -: 8]);
    return b;
  endfunction

  task automatic parse(ref words_t s);
    while (s.size() >= 3) begin
      logic [63:0] w0, w1;
      int body, nw, klen;
      logic [31:0] opq;
      logic [15:0] status;
      w0 = s[0]; w1 = s[1];
      body = int'(w1[63:32]); opq = w1[31:0]; klen = int'(w0[47:32]); status = w0[15:0];
      nw = 3 + (body + 7) / 8;
      if (s.size() < nw) break;
      n_resp++;
      check(w0[63:56] == 8'h81, "response magic");
      if (!pend.exists(int'(opq))) check(0, $sformatf("unexpected opaque %h", opq));
      else begin
        pend_t p;
        p = pend[int'(opq)];
        check(w0[55:48] == p.op, "response opcode");
        if (p.op == 8'h00) begin
          if (p.exp_hit) begin
            bytes_t b;
            b = unpack(s, 3, body);
            check(status == 16'h0 && klen == kv[p.kid].key.size() && body == klen + p.val.size(),
                  $sformatf("GET hit status=%0d klen=%0d body=%0d key %0d", status, klen, body, p.kid));
            if (status == 0 && body == klen + p.val.size()) begin
              bit ok;
              ok = 1;
              foreach (kv[p.kid].key[i]) if (b[i] != kv[p.kid].key[i]) ok = 0;
              foreach (p.val[i]) if (b[klen + i] != p.val[i]) ok = 0;
              check(ok, $sformatf("GET data key %0d", p.kid));
            end
          end else check(status == 16'h1 && body == 0, $sformatf("GET miss status=%0d key %0d", status, p.kid));
        end else if (p.op == 8'h01) check(status == 16'h0, "SET stored");
        else check(status == (p.exp_hit ? 16'h0 : 16'h1), "DELETE status");
        pend.delete(int'(opq));
      end
      repeat (nw) void'(s.pop_front());
    end
  endtask

  task automatic send(int node, byte unsigned op, int kid);
    words_t w;
    logic [31:0] opq;
    pend_t p;
    bytes_t none;
    opq = 32'(seq++);
    p.op = op; p.kid = kid; p.exp_hit = kv.exists(kid) && kv[kid].live; p.val = p.exp_hit ? kv[kid].val : none;
    if (op == 8'h01) begin p.exp_hit = 1; p.val = kv[kid].val; end
    pend[int'(opq)] = p;
    w = build_req(op, kv.exists(kid) ? kv[kid].key : make_key(kid, 8 + kid % 30), kv.exists(kid) ? kv[kid].val : none, opq);
    foreach (w[i]) txq[node].push_back(w[i]);
  endtask

  task automatic wait_all(string phase);
    int t;
    t = 0;
    while (pend.size() > 0 && t < 400000) begin @(posedge clk); t++; end
    check(pend.size() == 0, $sformatf("%s: %0d responses missing", phase, pend.size()));
    $display("phase %s done, %0d responses so far, cycle wait %0d", phase, n_resp, t);
  endtask

  int keys [$];
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int sum [16];
  initial begin
    for (int n = 0; n < NN; n++) flush_req[n] = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    foreach (SIZES[z]) begin
      longint t0;
      int fr0, ev6, ev9;
      keys.delete();
      ev6 = ev[0][6]; ev9 = ev[0][9];
      t0 = cyc;
      for (int i = 0; i < NOBJ; i++) begin
        int kid;
        kid = z * 100 + i;
        kv[kid].key  = make_key(kid, 16);
        kv[kid].val  = make_val(kid, SIZES[z]);
        kv[kid].live = 1;
        keys.push_back(kid);
        send(0, 8'h01, kid);
      end
      wait_all("SET");
      $display("size %0d B: SET %0d cycles per op", SIZES[z], (cyc - t0) / NOBJ);
      t0 = cyc; fr0 = ev[0][7];
      foreach (keys[i]) send(0, 8'h00, keys[i]);
      wait_all("GET");
      $display("size %0d B: GET before flush %0d cycles per op, %0d flash reads", SIZES[z], (cyc - t0) / NOBJ, ev[0][7] - fr0);
      // flush: flush the write buffers to flash
      @(negedge clk); for (int n = 0; n < NN; n++) flush_req[n] = 1'b1;
      @(negedge clk); for (int n = 0; n < NN; n++) flush_req[n] = 1'b0;
      begin
        int t;
        bit done;
        t = 0;
        do begin
          repeat (100) @(posedge clk); t += 100;
          done = 1;
          for (int n = 0; n < NN; n++) if (ev[n][6] != ev6 && ev[n][9] == ev9) done = 0;
        end while (!done && t < 300000);
        check(done, "write buffers flushed");
      end
      t0 = cyc; fr0 = ev[0][7];
      foreach (keys[i]) send(0, 8'h00, keys[i]);
      wait_all("GET");
      $display("size %0d B: GET after flush %0d cycles per op, %0d flash reads", SIZES[z], (cyc - t0) / NOBJ, ev[0][7] - fr0);
    end
    repeat (200) @(posedge clk);

    for (int k = 0; k < 16; k++) begin sum[k] = 0; for (int n = 0; n < NN; n++) sum[k] += ev[n][k]; end
    $display("mechanisms: dram_stall=%0d resp_stall=%0d evict=%0d wbuf_read=%0d flush=%0d erase=%0d bad=%0d flash_read=%0d",
             n_dram_stall, n_hw_stall, sum[6], sum[8], sum[9], sum[10], n_bad, sum[7]);
    $display("            req local=%0d remote=%0d rsp remote=%0d reservations q=%0d s=%0d early_flush=%0d false_hit=%0d",
             sum[0], sum[1], sum[12], sum[2], sum[13], sum[15], sum[5]);
    check(sum[6] > 0,  "mechanism: slab eviction");
    check(sum[9] > 0,  "mechanism: chunk flush");
    check(sum[7] > 0,  "mechanism: flash page read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d responses pending", pend.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
