// completion_buffer: bookkeeping for requests in flight inside a node.
// Because the hash table and the inter-node routers can answer out of
// order, each decoded request takes a free entry index; its metadata
// (opcode, opaque request id, key length, sender node) and its full key
// (up to 256 bytes = 32 words) are stored under that index and read back
// when the response with the same index returns, so that the full key can be
// compared.  The index then goes back to the free-index queue.
//
// Free indices: after reset the entries 0..ENTRIES-1 are handed out in order
// by a counter, later ones come from the free-index FIFO.  alloc_idx is valid
// while alloc_ready; metadata is written on the alloc handshake.  Key words
// are written one per cycle (kw_*).  Reads are combinational.
//
// Follows the original: request metadata and key are kept by index and the
// index returns to a free-index queue after use. Own choices: 128 entries,
// the counter that hands out never-used indices first, and the two key read
// ports.
module completion_buffer
  import bc_pkg::*;
#(
  parameter int ENTRIES = 1 << CIDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              alloc_valid,
  output logic              alloc_ready,
  output logic [CIDX_W-1:0] alloc_idx,
  input  cb_meta_t          alloc_meta,
  input  logic              kw_valid,
  input  logic [CIDX_W-1:0] kw_idx,
  input  logic [4:0]        kw_sel,
  input  logic [63:0]       kw_data,
  input  logic [CIDX_W-1:0] ra_idx,      // read port A (request side)
  input  logic [4:0]        ra_sel,
  output logic [63:0]       ra_key,
  input  logic [CIDX_W-1:0] rb_idx,      // read port B (response side)
  input  logic [4:0]        rb_sel,
  output logic [63:0]       rb_key,
  output cb_meta_t          rb_meta,
  input  logic              free_valid,
  input  logic [CIDX_W-1:0] free_idx,
  output logic [CIDX_W:0]   in_use
);
  cb_meta_t    meta [ENTRIES];
  logic [63:0] keym [ENTRIES*KEY_WORDS];
  logic [CIDX_W:0] fresh;
  logic        fq_valid, fq_in_ready;
  logic [CIDX_W-1:0] fq_head;
  logic [CIDX_W:0]   fq_count;

  wire use_fresh = (fresh < (CIDX_W+1)'(ENTRIES));
  assign alloc_ready = use_fresh || fq_valid;
  assign alloc_idx   = use_fresh ? fresh[CIDX_W-1:0] : fq_head;
  wire do_alloc = alloc_valid && alloc_ready;

  sync_fifo #(.T(logic [CIDX_W-1:0]), .DEPTH(ENTRIES)) u_free (
    .clk, .rst_n, .in_valid(free_valid), .in_ready(fq_in_ready), .in_data(free_idx),
    .out_valid(fq_valid), .out_ready(do_alloc && !use_fresh), .out_data(fq_head), .count(fq_count));

  assign ra_key  = keym[{ra_idx, ra_sel}];
  assign rb_key  = keym[{rb_idx, rb_sel}];
  assign rb_meta = meta[rb_idx];

  always_ff @(posedge clk) begin
    if (do_alloc) meta[alloc_idx] <= alloc_meta;
    if (kw_valid) keym[{kw_idx, kw_sel}] <= kw_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= '0; in_use <= '0;
    end else begin
      if (do_alloc && use_fresh) fresh <= fresh + 1'b1;
      in_use <= in_use + (CIDX_W+1)'(do_alloc) - (CIDX_W+1)'(free_valid);
    end
  end
endmodule
