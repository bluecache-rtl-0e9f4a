// bad_block_list: block-level logical-to-physical remapping of the flash
// store.  When an erase reports a bad block, its (chip, logical block) pair
// is entered into the list and given a spare block of the same chip; every
// later flash command to that logical block goes to the spare.  Each chip
// keeps the blocks from LOG_BLOCKS up as its spare pool, handed out in order.
// If a spare itself turns out bad the existing entry is re-pointed to the next
// spare.
//
// Lookup is combinational: a fully associative search of ENTRIES entries
// (identity mapping when there is no entry).  Insert takes one cycle and
// returns the new physical block on the same cycle it is accepted
// (ins_phys), with ins_ok = 0 when the list or the chip's spares ran out.
//
// Follows the original: a logical-to-physical block map per chip filled when
// an erase fails. Own choices: spares are the top 64 blocks of each chip, and
// the table size.
module bad_block_list
  import bc_pkg::*;
#(
  parameter int ENTRIES    = 64,
  parameter int LOG_BLOCKS = 4032,
  parameter int SPARES     = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // lookup
  input  logic [6:0]          lk_chip,      // {bus, chip}
  input  logic [BLOCK_W-1:0]  lk_block,
  output logic [BLOCK_W-1:0]  lk_phys,
  // insert a bad block
  input  logic                ins_valid,
  input  logic [6:0]          ins_chip,
  input  logic [BLOCK_W-1:0]  ins_block,    // logical block
  output logic [BLOCK_W-1:0]  ins_phys,
  output logic                ins_ok,
  output logic [$clog2(ENTRIES+1)-1:0] num_bad
);
  typedef struct packed {
    logic               valid;
    logic [6:0]         chip;
    logic [BLOCK_W-1:0] lblock;
    logic [BLOCK_W-1:0] pblock;
  } bbl_entry_t;

  bbl_entry_t tab [ENTRIES];
  logic [$clog2(SPARES+1)-1:0] spare_used [128];
  logic [$clog2(ENTRIES+1)-1:0] nent;

  always_comb begin
    lk_phys = lk_block;
    for (int i = 0; i < ENTRIES; i++)
      if (tab[i].valid && tab[i].chip == lk_chip && tab[i].lblock == lk_block) lk_phys = tab[i].pblock;
  end

  logic                   ins_hit;
  logic [$clog2(ENTRIES)-1:0] ins_idx;
  always_comb begin
    ins_hit = 1'b0; ins_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (tab[i].valid && tab[i].chip == ins_chip && tab[i].lblock == ins_block) begin
        ins_hit = 1'b1; ins_idx = $clog2(ENTRIES)'(i);
      end
    ins_phys = BLOCK_W'(LOG_BLOCKS) + BLOCK_W'(spare_used[ins_chip]);
    ins_ok   = (int'(spare_used[ins_chip]) < SPARES) && (ins_hit || int'(nent) < ENTRIES);
  end
  assign num_bad = nent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nent <= '0;
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
      for (int c = 0; c < 128; c++) spare_used[c] <= '0;
    end else if (ins_valid && ins_ok) begin
      spare_used[ins_chip] <= spare_used[ins_chip] + 1'b1;
      if (ins_hit) tab[ins_idx].pblock <= ins_phys;
      else begin
        tab[nent[$clog2(ENTRIES)-1:0]] <= '{valid: 1'b1, chip: ins_chip, lblock: ins_block, pblock: ins_phys};
        nent <= nent + 1'b1;
      end
    end
  end
endmodule
