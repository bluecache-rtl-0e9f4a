// net_splitter: the splitter of the inter-node network engine.  It sends
// each packet either to the local queue or to the remote queue (the
// network router), one whole packet at a time.
//
// Request mode (IS_REQ = 1): packets come from the client DMA engine.  The
// header and key are held back in a small buffer while the key is hashed;
// the destination is nodeId = hash(key) mod NUM_NODES (Jenkins hash).  The
// packet is tagged with its destination, this node as sender and its length
// in words, then forwarded.
// Response mode (IS_REQ = 0): packets already carry the node that sent the
// request as destination; they are routed on it.
// Timing: in request mode a packet is held for its header, extras and key
// words plus the hash latency before its first word leaves; then one word
// per cycle.
//
// Follows the original: nodeId = hash(key) mod NUM_NODES, with requests
// tagged by their sender's id and responses routed back by that tag. Own
// choice: the header-and-key holding buffer.
module net_splitter
  import bc_pkg::*;
#(
  parameter bit IS_REQ    = 1'b1,
  parameter int NUM_NODES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  input  logic              in_valid,
  output logic              in_ready,
  input  net_flit_t         in,
  output logic              loc_valid,
  input  logic              loc_ready,
  output net_flit_t         loc,
  output logic              rem_valid,
  input  logic              rem_ready,
  output net_flit_t         rem,
  output logic [31:0]       n_local,
  output logic [31:0]       n_remote
);
  localparam int HB = 64;   // header + extras + key words held back
  logic [NODE_W-1:0] dest;

  logic       out_valid, out_ready;
  net_flit_t  out;
  wire to_local = (dest == node_id);
  assign loc_valid = out_valid && to_local;
  assign rem_valid = out_valid && !to_local;
  assign loc = out;
  assign rem = out;
  assign out_ready = to_local ? loc_ready : rem_ready;

  generate if (IS_REQ) begin : g_req
    typedef enum logic [2:0] {S_H0, S_H1, S_HOLD, S_HASH, S_REPLAY, S_PASS} state_e;
    state_e st;

    logic [63:0]       hb [HB];
    logic [5:0]        nh, ri;          // words held / replay index
    logic              hb_last [HB];
    logic [KLEN_W-1:0] klen;
    logic [7:0]        ext;
    logic [5:0]        need;            // words to hold: 3 + ext/8 + key words
    logic [LEN_W-1:0]  len;
    logic              h_start, h_busy, h_done, h_in_valid;
    logic [31:0]       h_j;
    logic [HKEY_W-1:0] h_k;
    logic [5:0]        keyw_first;

    kv_hash u_hash (.clk, .rst_n, .start(h_start), .klen(klen), .in_valid(h_in_valid), .in_word(in.data),
                    .busy(h_busy), .done(h_done), .jhash(h_j), .hkey(h_k));
    assign h_start    = (st == S_H1) && in_valid;
    assign h_in_valid = (st == S_HOLD) && in_valid && (nh >= keyw_first);
    assign in_ready   = (st == S_H0) || (st == S_H1) || (st == S_HOLD) || (st == S_PASS && out_ready);
    always_comb begin
      out = '0; out.dest = dest; out.src = node_id; out.len = len;
      out_valid = 1'b0;
      if (st == S_REPLAY) begin out_valid = 1'b1; out.data = hb[ri]; out.last = hb_last[ri]; end
      else if (st == S_PASS) begin out_valid = in_valid; out.data = in.data; out.last = in.last; end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st <= S_H0; nh <= '0; ri <= '0; klen <= '0; ext <= '0; need <= '0; dest <= '0; len <= '0;
        keyw_first <= '0; n_local <= '0; n_remote <= '0;
        for (int i = 0; i < HB; i++) begin hb[i] <= '0; hb_last[i] <= 1'b0; end
      end else begin
        case (st)
          S_H0: if (in_valid) begin
            hb[0] <= in.data; hb_last[0] <= in.last;
            klen <= in.data[39:32]; ext <= in.data[31:24];
            nh <= 6'd1; st <= S_H1;
          end
          S_H1: if (in_valid) begin
            hb[1] <= in.data; hb_last[1] <= in.last;
            len  <= pkt_words(in.data[63:32]);
            keyw_first <= 6'd3 + 6'(ext >> 3);
            need <= 6'd3 + 6'(ext >> 3) + 6'((9'(klen) + 9'd7) >> 3);
            nh <= 6'd2; st <= S_HOLD;
          end
          S_HOLD: if (in_valid) begin
            hb[nh] <= in.data; hb_last[nh] <= in.last;
            nh <= nh + 1'b1;
            if (nh + 1'b1 == need || in.last) st <= S_HASH;
          end
          S_HASH: if (h_done || !h_busy) begin
            dest <= NODE_W'(h_j % NUM_NODES);
            ri <= '0;
            st <= S_REPLAY;
          end
          S_REPLAY: if (out_ready) begin
            if (ri == 6'd0) begin
              if (to_local) n_local <= n_local + 1'b1; else n_remote <= n_remote + 1'b1;
            end
            ri <= ri + 1'b1;
            if (hb_last[ri]) st <= S_H0;
            else if (ri + 1'b1 == nh) st <= S_PASS;
          end
          S_PASS: if (in_valid && out_ready && in.last) st <= S_H0;
          default: st <= S_H0;
        endcase
      end
    end
  end else begin : g_rsp
    logic inpkt;
    assign in_ready = out_ready;
    always_comb begin
      out = in;
      out_valid = in_valid;
    end
    assign dest = in.dest;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        inpkt <= 1'b0; n_local <= '0; n_remote <= '0;
      end else if (in_valid && out_ready) begin
        if (!inpkt) begin
          if (to_local) n_local <= n_local + 1'b1; else n_remote <= n_remote + 1'b1;
        end
        inpkt <= !in.last;
      end
    end
  end endgenerate
endmodule
