// kvs_protocol_engine: decodes memcached binary-protocol requests for the
// local hybrid-memory hash table and formats the responses.
//
// Request side: a request packet (24-byte header, extras, key, value as
// 64-bit words; sender node id as sideband) is parsed.  A free completion
// buffer entry is taken and the request metadata and full key are stored in
// it while the key is hashed (Jenkins hash for the bucket, second hash for
// the 27-bit signature).  The hash-table command carries the completion
// index.  For SET the key words are then replayed from the completion buffer
// followed by the value words, forming the object stream (key then value).
// Extras must be a multiple of 8 bytes (SET carries 8: flags + expiry).
//
// Response side: for each hash-table response the metadata is read back by
// completion index.  For a GET hit the stored key returned with the object is
// compared with the request's full key (a signature match can be a false
// hit).  On a match the response carries status 0, key length klen and a
// body of key + value (the GETK form); otherwise status "not found" and no
// body.  SET answers "stored" or "not stored", DELETE "ok" or "not found".
// The response goes to the request's sender node and the completion index is
// freed.  Request and response sides run concurrently.
//
// Follows the original: the memcached binary protocol with a 24-byte header,
// the completion buffer, and the full-key check that turns a false hit into a
// miss. Own choices: the GETK response form, padding to 8-byte words, and
// treating unknown opcodes as GET.
module kvs_protocol_engine
  import bc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // requests (from the local request queue)
  input  logic              req_valid,
  output logic              req_ready,
  input  net_flit_t         req,
  // responses (to the response splitter)
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output net_flit_t         rsp,
  // hash table
  output logic              ht_cmd_valid,
  input  logic              ht_cmd_ready,
  output ht_cmd_t           ht_cmd,
  output logic              ht_in_valid,
  input  logic              ht_in_ready,
  output logic [63:0]       ht_in_word,
  input  logic              ht_resp_valid,
  output logic              ht_resp_ready,
  input  ht_resp_t          ht_resp,
  input  logic              ht_out_valid,
  output logic              ht_out_ready,
  input  logic [63:0]       ht_out_word,
  input  logic              ht_out_last,
  // statistics
  output logic [31:0]       n_false_hits
);
  // ---------------- completion buffer
  logic              cb_alloc_valid, cb_alloc_ready, cb_kw_valid, cb_free_valid;
  logic [CIDX_W-1:0] cb_alloc_idx;
  cb_meta_t          cb_meta_in, cb_rb_meta;
  logic [4:0]        cb_kw_sel, cb_ra_sel, cb_rb_sel;
  logic [63:0]       cb_ra_key, cb_rb_key;
  logic [CIDX_W:0]   cb_in_use;

  // ---------------- request side
  typedef enum logic [3:0] {Q_H0, Q_H1, Q_H2, Q_EXT, Q_KEY, Q_HASH, Q_CMD, Q_REPLAY, Q_VALUE, Q_SKIP} qstate_e;
  qstate_e qs;
  logic [7:0]        q_op;
  logic [KLEN_W-1:0] q_klen;
  logic [7:0]        q_ext;
  logic [31:0]       q_body, q_opaque;
  logic [NODE_W-1:0] q_src;
  logic [CIDX_W-1:0] q_cidx;
  logic [5:0]        q_kw, q_i;         // key words / counter
  logic [17:0]       q_objw, q_j;       // object words / counter
  logic [4:0]        q_extw;
  logic              h_start, h_busy, h_done;
  assign h_start = (qs == Q_H2) && req_valid && cb_alloc_ready;
  logic [31:0]       h_j;
  logic [HKEY_W-1:0] h_k;

  kv_hash u_hash (
    .clk, .rst_n, .start(h_start), .klen(q_klen), .in_valid(qs == Q_KEY && req_valid),
    .in_word(req.data), .busy(h_busy), .done(h_done), .jhash(h_j), .hkey(h_k));

  logic [VLEN_W-1:0] q_vlen;
  assign q_vlen = VLEN_W'(q_body - 32'(q_ext) - 32'(q_klen));

  always_comb begin
    req_ready = 1'b0;
    case (qs)
      Q_H0, Q_EXT, Q_SKIP: req_ready = 1'b1;
      Q_H1:    req_ready = 1'b1;
      Q_H2:    req_ready = cb_alloc_ready;
      Q_KEY:   req_ready = 1'b1;
      Q_VALUE: req_ready = ht_in_ready;
      default: req_ready = 1'b0;
    endcase
  end
  assign cb_alloc_valid = (qs == Q_H2) && req_valid;
  assign cb_meta_in     = '{opcode: q_op, opaque: q_opaque, klen: q_klen, src: q_src};
  assign cb_kw_valid    = (qs == Q_KEY) && req_valid;
  assign cb_kw_sel      = q_i[4:0];
  assign cb_ra_sel      = q_i[4:0];

  assign ht_cmd_valid = (qs == Q_CMD);
  always_comb begin
    ht_cmd.op    = (q_op == OP_SET) ? HT_SET : (q_op == OP_DELETE) ? HT_DEL : HT_GET;
    ht_cmd.klen  = q_klen;
    ht_cmd.vlen  = (q_op == OP_SET) ? q_vlen : '0;
    ht_cmd.jhash = h_j;
    ht_cmd.hkey  = h_k;
    ht_cmd.cidx  = q_cidx;
  end
  assign ht_in_valid = (qs == Q_REPLAY) || (qs == Q_VALUE && req_valid);
  assign ht_in_word  = (qs == Q_REPLAY) ? cb_ra_key : req.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_H0; q_op <= '0; q_klen <= '0; q_ext <= '0; q_body <= '0; q_opaque <= '0; q_src <= '0;
      q_cidx <= '0; q_kw <= '0; q_i <= '0; q_objw <= '0; q_j <= '0; q_extw <= '0;
    end else begin
      case (qs)
        Q_H0: if (req_valid) begin
          q_op   <= req.data[55:48];
          q_klen <= req.data[39:32];          // key length <= 255
          q_ext  <= req.data[31:24];
          q_src  <= req.src;
          qs     <= Q_H1;
        end
        Q_H1: if (req_valid) begin
          q_body   <= req.data[63:32];
          q_opaque <= req.data[31:0];
          qs       <= Q_H2;
        end
        Q_H2: if (req_valid && cb_alloc_ready) begin
          q_cidx  <= cb_alloc_idx;
          q_extw  <= 5'(q_ext >> 3);
          q_kw    <= 6'((9'(q_klen) + 9'd7) >> 3);
          q_objw  <= 18'((q_body - 32'(q_ext) + 32'd7) >> 3);
          q_i     <= '0;
          q_j     <= '0;
          qs      <= (q_ext != 0) ? Q_EXT : (q_klen != 0) ? Q_KEY : Q_HASH;
        end
        Q_EXT: if (req_valid) begin
          q_extw <= q_extw - 1'b1;
          if (q_extw == 5'd1) qs <= (q_klen != 0) ? Q_KEY : Q_HASH;
        end
        Q_KEY: if (req_valid) begin
          q_i <= q_i + 1'b1;
          q_j <= q_j + 1'b1;
          if (q_i == q_kw - 1'b1) qs <= Q_HASH;
        end
        Q_HASH: if (h_done) qs <= Q_CMD;
        Q_CMD: if (ht_cmd_ready) begin
          q_i <= '0;
          if (q_op == OP_SET && q_objw != 0) qs <= (q_kw != 0) ? Q_REPLAY : Q_VALUE;
          else qs <= (q_objw > 18'(q_kw)) ? Q_SKIP : Q_H0;
        end
        Q_REPLAY: if (ht_in_ready) begin
          q_i <= q_i + 1'b1;
          if (q_i == q_kw - 1'b1) qs <= (q_objw > 18'(q_kw)) ? Q_VALUE : Q_H0;
        end
        Q_VALUE: if (req_valid && ht_in_ready) begin
          q_j <= q_j + 1'b1;
          if (q_j == q_objw - 1'b1) qs <= Q_H0;
        end
        Q_SKIP: if (req_valid && req.last) qs <= Q_H0;   // GET/DELETE with a body beyond the key
        default: qs <= Q_H0;
      endcase
    end
  end

  // ---------------- response side
  typedef enum logic [2:0] {R_IDLE, R_KEY, R_H0, R_H1, R_H2, R_KOUT, R_VOUT, R_DRAIN} rstate_e;
  rstate_e rs;
  ht_resp_t    r;
  logic        r_match, r_bad;
  logic [63:0] kbuf [KEY_WORDS];
  logic [5:0]  r_kw, r_i;
  logic [17:0] r_objw, r_j;
  logic [15:0] r_status;
  logic [31:0] r_body;

  assign cb_rb_sel = r_i[4:0];

  // byte mask of key word r_i
  logic [63:0] kmask;
  always_comb begin
    int nb;
    nb = int'(r.klen) - 8 * int'(r_i);
    kmask = '0;
    for (int b = 0; b < 8; b++) if (b < nb) kmask[63-8*b -: 8] = 8'hff;
  end

  assign ht_resp_ready = (rs == R_IDLE);
  assign ht_out_ready  = (rs == R_KEY) || (rs == R_VOUT && rsp_ready) || (rs == R_DRAIN);

  always_comb begin
    rsp_valid = 1'b0;
    rsp       = '0;
    rsp.dest  = cb_rb_meta.src;
    rsp.src   = node_id;
    rsp.len   = pkt_words(r_body);
    case (rs)
      R_H0: begin rsp_valid = 1'b1; rsp.data = {MAGIC_RESP, cb_rb_meta.opcode, 8'd0, r_match ? r.klen : 8'd0, 16'd0, r_status}; end
      R_H1: begin rsp_valid = 1'b1; rsp.data = {r_body, cb_rb_meta.opaque}; end
      R_H2: begin rsp_valid = 1'b1; rsp.data = '0; rsp.last = (r_body == 0); end
      R_KOUT: begin rsp_valid = 1'b1; rsp.data = kbuf[r_i[4:0]]; rsp.last = (r_j == r_objw - 1'b1); end
      R_VOUT: begin rsp_valid = ht_out_valid; rsp.data = ht_out_word; rsp.last = (r_j == r_objw - 1'b1); end
      default: ;
    endcase
  end
  assign cb_free_valid = (rs == R_H2 && rsp_ready && r_body == 0) ||
                         (rs == R_KOUT && rsp_ready && r_j == r_objw - 1'b1) ||
                         (rs == R_VOUT && rsp_ready && ht_out_valid && r_j == r_objw - 1'b1);

  wire mm     = ((ht_out_word ^ cb_rb_key) & kmask) != 0;   // key word mismatch
  wire key_ok = !mm && !r_bad;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; r <= '0; r_match <= 1'b0; r_kw <= '0; r_i <= '0; r_objw <= '0; r_j <= '0;
      r_status <= '0; r_body <= '0; n_false_hits <= '0; r_bad <= 1'b0;
      for (int i = 0; i < KEY_WORDS; i++) kbuf[i] <= '0;
    end else begin
      case (rs)
        R_IDLE: if (ht_resp_valid) begin
          r      <= ht_resp;
          r_kw   <= 6'((9'(ht_resp.klen) + 9'd7) >> 3);
          r_objw <= 18'((21'(ht_resp.klen) + 21'(ht_resp.vlen) + 21'd7) >> 3);
          r_i <= '0; r_j <= '0; r_match <= 1'b0; r_bad <= 1'b0; r_body <= '0;
          case (ht_resp.op)
            HT_GET: begin
              r_status <= ST_NOT_FOUND;
              rs <= (ht_resp.hit && ht_resp.klen != 0) ? R_KEY : R_H0;
            end
            HT_SET:  begin r_status <= ht_resp.hit ? ST_OK : ST_NOT_STORED; rs <= R_H0; end
            default: begin r_status <= ht_resp.hit ? ST_OK : ST_NOT_FOUND; rs <= R_H0; end
          endcase
        end
        R_KEY: if (ht_out_valid) begin
          kbuf[r_i[4:0]] <= ht_out_word;
          r_i <= r_i + 1'b1;
          r_j <= r_j + 1'b1;
          if (mm) r_bad <= 1'b1;
          if (r_i == r_kw - 1'b1) begin
            r_match <= key_ok;
            if (key_ok) begin
              r_status <= ST_OK;
              r_body   <= 32'(r.klen) + 32'(r.vlen);
            end else begin
              n_false_hits <= n_false_hits + 1'b1;
            end
            rs <= R_H0;
          end
        end
        R_H0: if (rsp_ready) rs <= R_H1;
        R_H1: if (rsp_ready) rs <= R_H2;
        R_H2: if (rsp_ready) begin
          r_i <= '0; r_j <= '0;
          if (r_body != 0) rs <= R_KOUT;
          else if (r.op == HT_GET && r.hit && r.klen != 0 && r_objw > 18'(r_kw)) begin
            r_j <= 18'(r_kw); rs <= R_DRAIN;
          end else rs <= R_IDLE;
        end
        R_KOUT: if (rsp_ready) begin
          r_i <= r_i + 1'b1;
          r_j <= r_j + 1'b1;
          if (r_j == r_objw - 1'b1) rs <= R_IDLE;
          else if (r_i == r_kw - 1'b1) rs <= R_VOUT;
        end
        R_VOUT: if (rsp_ready && ht_out_valid) begin
          r_j <= r_j + 1'b1;
          if (r_j == r_objw - 1'b1) rs <= R_IDLE;
        end
        R_DRAIN: if (ht_out_valid) begin
          r_j <= r_j + 1'b1;
          if (r_j == r_objw - 1'b1) rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  completion_buffer u_cb (
    .clk, .rst_n, .alloc_valid(cb_alloc_valid), .alloc_ready(cb_alloc_ready), .alloc_idx(cb_alloc_idx),
    .alloc_meta(cb_meta_in), .kw_valid(cb_kw_valid), .kw_idx(q_cidx), .kw_sel(cb_kw_sel),
    .kw_data(req.data), .ra_idx(q_cidx), .ra_sel(cb_ra_sel), .ra_key(cb_ra_key),
    .rb_idx(r.cidx), .rb_sel(cb_rb_sel), .rb_key(cb_rb_key), .rb_meta(cb_rb_meta),
    .free_valid(cb_free_valid), .free_idx(r.cidx), .in_use(cb_in_use));
endmodule
