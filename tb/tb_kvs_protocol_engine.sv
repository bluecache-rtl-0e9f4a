// tb_kvs_protocol_engine: the protocol engine against a behavioural hash
// table.  Memcached binary SET, GET and DELETE requests (random key and
// value sizes, some keys never stored) arrive from node 2.  The model
// checks each hash-table command (operation, key length, value length,
// Jenkins hash and signature of the key) and the SET object stream
// (key then value), answers in order, and for every fourth GET of a stored
// key returns another key's object of the same key length to imitate a
// signature collision.  Checks on the response packets: magic, opcode,
// opaque, status, GETK body (key + value), routing back to the sender,
// and that the collided GETs were answered "not found" and counted as
// false hits.  Random back-pressure on every interface.
//
// The expected values come from independent reference models in the
// testbench. The behaviour checked is the one described in the header of the
// module under test; the stimulus sizes and random patterns are own choices.
module tb_kvs_protocol_engine;
  import bc_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;     // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, rsp_valid, rsp_ready = 0;
  net_flit_t req = '0, rsp;
  logic ht_cmd_valid, ht_cmd_ready = 0, ht_in_valid, ht_in_ready = 0, ht_resp_valid = 0, ht_resp_ready;
  ht_cmd_t ht_cmd; ht_resp_t ht_resp = '0;
  logic [63:0] ht_in_word, ht_out_word = 0;
  logic ht_out_valid = 0, ht_out_ready, ht_out_last = 0;
  logic [31:0] n_false_hits;
  kvs_protocol_engine dut (.clk, .rst_n, .node_id(NODE_W'(1)), .*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // reference requests
  typedef struct { byte unsigned op; int id; bit exp_hit; bit collide; } rq_t;
  rq_t rq [int];
  bytes_t key [int], val [int];
  bit stored [int];
  int col_count = 0, ngets = 0;

  // ---------------- behavioural hash table ----------------
  words_t obj_of [int];           // by key id
  int     klen_of [int], vlen_of [int];
  initial begin
    forever begin
      ht_cmd_t c;
      int id, other;
      bit hit;
      words_t o;
      @(negedge clk); ht_cmd_ready = $urandom_range(0, 1);
      if (!(ht_cmd_valid && ht_cmd_ready)) continue;
      c = ht_cmd;
      @(negedge clk); ht_cmd_ready = 0;
      id = -1;
      foreach (key[k]) if (ref_jhash(key[k]) == c.jhash && ref_hkey(key[k]) == c.hkey && key[k].size() == int'(c.klen)) id = k;
      check(id >= 0, "command hash / signature / key length match a key");
      if (c.op == HT_SET) begin
        int nw;
        check(int'(c.vlen) == val[id].size(), "SET value length");
        nw = (int'(c.klen) + int'(c.vlen) + 7) / 8;
        o = {};
        while (o.size() < nw) begin
          ht_in_ready = $urandom_range(0, 2) != 0;
          @(posedge clk);
          if (ht_in_valid && ht_in_ready) o.push_back(ht_in_word);
          @(negedge clk);
        end
        ht_in_ready = 0;
        begin
          bytes_t eo; words_t e;
          eo = key[id]; foreach (val[id][i]) eo.push_back(val[id][i]);
          e = pack_bytes(eo);
          check(o == e, "SET object stream");
        end
        obj_of[id] = o; klen_of[id] = int'(c.klen); vlen_of[id] = int'(c.vlen);
        hit = 1;
      end else if (c.op == HT_DEL) begin
        hit = obj_of.exists(id); obj_of.delete(id);
      end else begin
        hit = obj_of.exists(id);
        other = id;
        if (hit && (ngets++ % 4 == 3))
          foreach (obj_of[k]) if (k != id && klen_of[k] == klen_of[id] && key[k] != key[id]) other = k;
        if (other != id) begin
          bit marked;
          marked = 0;
          col_count++;
          foreach (rq[q]) if (!marked && rq[q].op == 8'h00 && rq[q].id == id) begin rq[q].collide = 1; marked = 1; end
        end
      end
      ht_resp = '0; ht_resp.op = c.op; ht_resp.hit = hit; ht_resp.cidx = c.cidx;
      if (c.op == HT_GET && hit) begin ht_resp.klen = 8'(klen_of[other]); ht_resp.vlen = 20'(vlen_of[other]); end
      ht_resp_valid = 1;
      do @(posedge clk); while (!ht_resp_ready);
      @(negedge clk); ht_resp_valid = 0;
      if (c.op == HT_GET && hit) begin
        o = obj_of[other];
        for (int i = 0; i < o.size(); i++) begin
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          ht_out_valid = 1; ht_out_word = o[i]; ht_out_last = (i == o.size() - 1);
          do @(posedge clk); while (!ht_out_ready);
          @(negedge clk); ht_out_valid = 0;
        end
      end
    end
  end

  // ---------------- response checker ----------------
  words_t cur;
  int nresp = 0, miss_collide = 0;
  always @(posedge clk) begin
    rsp_ready <= $urandom_range(0, 3) != 0;
    if (rsp_valid && rsp_ready) begin
      cur.push_back(rsp.data);
      check(int'(rsp.dest) == 2 && int'(rsp.src) == 1, "response routed to the sender");
      if (rsp.last) begin
        logic [63:0] w0, w1;
        int body, opq;
        w0 = cur[0]; w1 = cur[1]; body = int'(w1[63:32]); opq = int'(w1[31:0]);
        check(cur.size() == 3 + (body + 7) / 8, "response length");
        check(w0[63:56] == 8'h81 && rq.exists(opq), "magic / opaque");
        if (rq.exists(opq)) begin
          rq_t r;
          r = rq[opq];
          check(w0[55:48] == r.op, "opcode");
          if (r.op == 8'h00) begin
            if (r.exp_hit && !r.collide) begin
              bytes_t eo; words_t e;
              eo = key[r.id]; foreach (val[r.id][i]) eo.push_back(val[r.id][i]);
              e = pack_bytes(eo);
              check(w0[15:0] == 0 && int'(w0[47:32]) == key[r.id].size() && body == eo.size(), "GET hit header");
              for (int i = 0; i < e.size() && 3 + i < cur.size(); i++) check(cur[3 + i] == e[i], "GET body");
            end else begin
              check(w0[15:0] == 16'h1 && body == 0, "GET not found");
              if (r.collide) miss_collide++;
            end
          end else if (r.op == 8'h01) check(w0[15:0] == 0, "SET stored");
          else check(w0[15:0] == (r.exp_hit ? 16'h0 : 16'h1), "DELETE status");
          rq.delete(opq);
        end
        cur = {};
        nresp++;
      end
    end
  end

  int opq = 0;
  task automatic send(byte unsigned op, int id);
    words_t w;
    rq_t r;
    r.op = op; r.id = id; r.exp_hit = (op == 8'h01) ? 1 : stored[id]; r.collide = 0;
    if (op == 8'h04) stored[id] = 0;
    if (op == 8'h01) stored[id] = 1;
    rq[opq] = r;
    w = build_req(op, key[id], val[id], 32'(opq));
    opq++;
    foreach (w[i]) begin
      net_flit_t f;
      f = '0; f.data = w[i]; f.last = (i == w.size() - 1); f.src = NODE_W'(2); f.dest = NODE_W'(1);
      f.len = LEN_W'(w.size());
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      req_valid = 1; req = f;
      do @(posedge clk); while (!req_ready);
      @(negedge clk); req_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      key[i] = make_key(i, 8 + (i % 4) * 8 + (i / 20));   // groups of equal key length
      val[i] = make_val(i, (i * 29) % 200);
      stored[i] = 0;
    end
    for (int i = 0; i < 30; i++) send(8'h01, i);
    for (int round = 0; round < 3; round++)
      for (int i = 0; i < 40; i++) begin
        if (round == 1 && i % 5 == 0) send(8'h04, i);
        send(8'h00, i);
      end
    while (rq.size() > 0) @(negedge clk);
    check(col_count > 0 && miss_collide == col_count, $sformatf("collisions answered not found (%0d of %0d)", miss_collide, col_count));
    check(int'(n_false_hits) == col_count, "false hits counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
