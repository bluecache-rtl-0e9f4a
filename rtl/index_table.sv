// index_table: the 4-way set-associative in-memory index table of the
// hybrid-memory hash table.  The table itself lives in DRAM: each 64-byte
// line (one DDR3 burst) is a hash bucket holding four 128-bit entries
// {timestamp, hashed key, key length, value length, key-value pointer}.
// The bucket address is the low INDEX_BITS of the Jenkins hash of the key.
//
// For every command the bucket is read, the four entries are compared in
// parallel on {key length, hashed key} (key length 0 = empty entry), and the
// bucket is written back if it changed:
//   IT_LOOKUP : hit returns the entry; its timestamp is refreshed to `now`.
//   IT_INSERT : a matching entry is overwritten; else the first empty entry;
//               else the entry with the oldest timestamp is evicted.  The
//               response returns the entry that was replaced (old_valid).
//   IT_DELETE : a matching entry gets key length 0.
//   IT_UPDATE : back-trace update after an object moved from DRAM to flash:
//               a matching entry whose pointer still equals old_ptr gets
//               new_ptr.
// Full keys are not compared here; a false hit is caught later by the
// protocol engine.  One command is in flight at a time: read (DRAM read
// latency) + one cycle compare + optional write.  Timestamps are compared as
// plain unsigned numbers (wrap-around of the 32-bit clock is not handled).
//
// Follows the original: 64-byte buckets of four 16-byte entries {timestamp,
// hashed key, key length, value length, 41-bit pointer}, lookup by hashed
// key, and replacement of the oldest entry. Own choices: 32-bit timestamp and
// 27-bit hashed key widths, the timestamp source, and in-place overwrite of a
// matching entry.
module index_table
  import bc_pkg::*;
#(
  parameter int         INDEX_BITS = 24,          // 2^24 buckets = 1 GB of DRAM
  parameter dram_addr_t INDEX_BASE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [1:0]        cmd_op,       // 0 lookup 1 insert 2 delete 3 update
  input  logic [31:0]       cmd_jhash,
  input  index_entry_t      cmd_entry,    // klen/hkey used for matching; full entry for insert
  input  logic [PTR_W-1:0]  cmd_old_ptr,  // update only
  // response
  output logic              resp_valid,
  input  logic              resp_ready,
  output logic              resp_hit,
  output index_entry_t      resp_entry,   // lookup: found entry; insert: replaced entry
  output logic              resp_old_valid,
  // DRAM
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_resp_valid,
  input  line_t             dram_resp_data
);
  localparam logic [1:0] IT_LOOKUP = 2'd0, IT_INSERT = 2'd1, IT_DELETE = 2'd2, IT_UPDATE = 2'd3;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WAIT, S_CMP, S_WR, S_RESP} state_e;
  state_e state;

  logic [1:0]       op;
  index_entry_t     ent;
  logic [PTR_W-1:0] old_ptr;
  dram_addr_t       baddr;
  index_entry_t     way [WAYS];
  line_t            wline;

  // parallel compare of the four entries
  logic [WAYS-1:0] match, empty;
  logic [1:0]      mway, eway, oway, tway;
  always_comb begin
    mway = '0; eway = '0; oway = '0;
    for (int i = 0; i < WAYS; i++) begin
      match[i] = (way[i].klen != '0) && (way[i].klen == ent.klen) && (way[i].hkey == ent.hkey);
      empty[i] = (way[i].klen == '0);
    end
    for (int i = WAYS-1; i >= 0; i--) begin
      if (match[i]) mway = 2'(i);
      if (empty[i]) eway = 2'(i);
    end
    for (int i = 1; i < WAYS; i++)
      if (way[i].timestamp < way[oway].timestamp) oway = 2'(i);
    tway = (|match) ? mway : (|empty) ? eway : oway;
  end

  assign cmd_ready      = (state == S_IDLE);
  assign dram_req_valid = (state == S_RD) || (state == S_WR);
  always_comb begin
    dram_req.addr  = baddr;
    dram_req.write = (state == S_WR);
    dram_req.wdata = wline;
  end
  assign resp_valid = (state == S_RESP);

  // new bucket line written back after the compare step
  logic [LINE_W-1:0] cmp_nl;
  logic              cmp_wr;
  index_entry_t      cmp_e;
  always_comb begin
    for (int i = 0; i < WAYS; i++) cmp_nl[128*i +: 128] = way[i];
    cmp_wr = 1'b0;
    cmp_e  = way[mway];
    case (op)
      IT_LOOKUP: if (|match) begin
        cmp_e.timestamp = now;
        cmp_nl[128*mway +: 128] = cmp_e; cmp_wr = 1'b1;
      end
      IT_INSERT: begin
        cmp_e = ent; cmp_e.timestamp = now;
        cmp_nl[128*tway +: 128] = cmp_e; cmp_wr = 1'b1;
      end
      IT_DELETE: if (|match) begin
        cmp_e.klen = '0;
        cmp_nl[128*mway +: 128] = cmp_e; cmp_wr = 1'b1;
      end
      default: // IT_UPDATE
        if (|match && way[mway].ptr == old_ptr) begin
          cmp_e.ptr = ent.ptr;
          cmp_nl[128*mway +: 128] = cmp_e; cmp_wr = 1'b1;
        end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; op <= '0; ent <= '0; old_ptr <= '0; baddr <= '0; wline <= '0;
      resp_hit <= 1'b0; resp_entry <= '0; resp_old_valid <= 1'b0;
      for (int i = 0; i < WAYS; i++) way[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (cmd_valid) begin
          op      <= cmd_op;
          ent     <= cmd_entry;
          old_ptr <= cmd_old_ptr;
          baddr   <= INDEX_BASE + dram_addr_t'(cmd_jhash[INDEX_BITS-1:0]);
          state   <= S_RD;
        end
        S_RD: if (dram_req_ready) state <= S_WAIT;
        S_WAIT: if (dram_resp_valid) begin
          for (int i = 0; i < WAYS; i++) way[i] <= dram_resp_data[128*i +: 128];
          state <= S_CMP;
        end
        S_CMP: begin
          resp_hit       <= |match;
          resp_entry     <= way[mway];
          resp_old_valid <= 1'b0;
          if (op == IT_INSERT) begin
            resp_entry     <= way[tway];
            resp_old_valid <= !empty[tway];
          end
          if (op == IT_UPDATE && !cmp_wr) resp_hit <= 1'b0;
          wline <= cmp_nl;
          state <= cmp_wr ? S_WR : S_RESP;
        end
        S_WR: if (dram_req_ready) state <= S_RESP;
        S_RESP: if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
