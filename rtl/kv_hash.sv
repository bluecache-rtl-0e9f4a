// kv_hash: computes the two hashes of a key as its 64-bit words stream in.
//
//  * jhash: Jenkins one-at-a-time hash (32 bits).  Its low bits give the
//    bucket address of the in-memory index table, and jhash mod number_of_nodes
//    gives the node that owns the key.
//  * hkey : a second, different hash stored in the index entry as the 27-bit
//    "hashed key" signature.  FNV-1a (32 bits, truncated to 27) is used here.
//
// Interface: pulse `start` with the key length in bytes, then present the key
// words on `in_valid`/`in_word` (big-endian bytes, byte 0 in [63:56]); the
// number of words is ceil(klen/8) and bytes past klen are ignored.  Up to
// eight bytes are absorbed per cycle.  `done` pulses for one cycle after the
// last word with jhash/hkey valid (held until the next start).  Key length 0
// finishes on the cycle after start.
//
// Follows the original: Jenkins hash for the index and a second, different
// hash for the stored signature. Own choices: the one-at-a-time Jenkins
// variant, FNV-1a as the second hash, and one key word per cycle.
module kv_hash
  import bc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [KLEN_W-1:0] klen,
  input  logic              in_valid,
  input  logic [63:0]       in_word,
  output logic              busy,
  output logic              done,
  output logic [31:0]       jhash,
  output logic [HKEY_W-1:0] hkey
);
  localparam logic [31:0] FNV_BASIS = 32'h811c9dc5;
  localparam logic [31:0] FNV_PRIME = 32'h01000193;

  logic [31:0] ja, fa;       // running states
  logic [8:0]  left;         // bytes still to absorb
  logic        fin;

  function automatic logic [31:0] oaat_final(input logic [31:0] h0);
    logic [31:0] h;
    h = h0;
    h = h + (h << 3);
    h = h ^ (h >> 11);
    h = h + (h << 15);
    return h;
  endfunction

  logic [31:0] ja_n, fa_n;
  logic [7:0]  by;
  always_comb begin
    ja_n = ja;
    fa_n = fa;
    by   = 8'd0;
    for (int b = 0; b < 8; b++) begin
      if (9'(b) < left) begin
        by   = in_word[63-8*b -: 8];
        ja_n = ja_n + {24'd0, by};
        ja_n = ja_n + (ja_n << 10);
        ja_n = ja_n ^ (ja_n >> 6);
        fa_n = (fa_n ^ {24'd0, by}) * FNV_PRIME;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ja <= '0; fa <= FNV_BASIS; left <= '0; busy <= 1'b0; done <= 1'b0; fin <= 1'b0;
      jhash <= '0; hkey <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ja <= '0; fa <= FNV_BASIS; left <= {1'b0, klen}; busy <= 1'b1;
        fin <= (klen == '0);
      end else if (busy) begin
        if (fin) begin
          jhash <= oaat_final(ja);
          hkey  <= fa[HKEY_W-1:0];
          done  <= 1'b1;
          busy  <= 1'b0;
          fin   <= 1'b0;
        end else if (in_valid) begin
          ja   <= ja_n;
          fa   <= fa_n;
          left <= (left > 9'd8) ? left - 9'd8 : 9'd0;
          if (left <= 9'd8) fin <= 1'b1;
        end
      end
    end
  end
endmodule
