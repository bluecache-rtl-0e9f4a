// flash_model: behavioural model of the flash controller and its NAND
// array.  Page writes take a command followed by PAGE_LINES data lines;
// page reads return all lines of the page under the command's tag after a
// random latency, pages completing out of order; erases are acknowledged
// after a delay and report a bad block for the (bus, chip, block) given by
// BAD_BUS/BAD_CHIP/BAD_BLOCK (its first erase only).  Pages are stored
// sparsely; a page that was never written reads as zeros.
//
// Behavioural stand-in for the flash cards and their controller, which the
// original does not design. Its latencies and bad-block injection are own
// choices.
module flash_model
  import bc_pkg::*;
#(
  parameter int BAD_BUS   = 3,
  parameter int BAD_CHIP  = 2,
  parameter int BAD_BLOCK = 0
) (
  input  logic             clk,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  flash_cmd_t       cmd,
  input  logic             wdata_valid,
  output logic             wdata_ready,
  input  line_t            wdata,
  output logic             rdata_valid,
  output flash_rdata_t     rdata,
  output logic             ack_valid,
  output flash_erase_ack_t ack
);
  typedef logic [30:0] pkey_t;   // {bus, chip, block, page}
  typedef struct { pkey_t k; logic [FTAG_W-1:0] tag; int unsigned due; } rd_t;
  typedef struct { flash_erase_ack_t a; int unsigned due; } er_t;
  line_t lines [logic [37:0]];   // key = {page key, line}
  rd_t rq[$];
  er_t eq[$];
  int unsigned cyc = 0;
  int wleft = 0;
  pkey_t wkey;
  int rline = -1;
  rd_t cur;
  bit bad_done = 0;
  int n_reads = 0, n_writes = 0, n_erases = 0;

  function automatic pkey_t key_of(flash_cmd_t c);
    return {c.bus, c.chip, c.block, c.page};
  endfunction

  assign cmd_ready   = (wleft == 0);
  assign wdata_ready = (wleft > 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd_valid && cmd_ready) begin
      case (cmd.op)
        F_READ:  begin rq.push_back('{k: key_of(cmd), tag: cmd.tag, due: cyc + $urandom_range(20, 120)}); n_reads++; end
        F_WRITE: begin wkey = key_of(cmd); wleft = PAGE_LINES; n_writes++; end
        default: begin
          flash_erase_ack_t a;
          a.bus = cmd.bus; a.chip = cmd.chip; a.block = cmd.block;
          a.bad = !bad_done && int'(cmd.bus) == BAD_BUS && int'(cmd.chip) == BAD_CHIP && int'(cmd.block) == BAD_BLOCK;
          if (a.bad) bad_done = 1;
          eq.push_back('{a: a, due: cyc + $urandom_range(5, 40)});
          n_erases++;
        end
      endcase
    end
    if (wdata_valid && wdata_ready) begin
      lines[{wkey, 7'(PAGE_LINES - wleft)}] = wdata;
      wleft = wleft - 1;
    end
    // erase acks
    ack_valid <= 1'b0;
    foreach (eq[i]) if (eq[i].due <= cyc) begin
      ack_valid <= 1'b1; ack <= eq[i].a; eq.delete(i); break;
    end
    // read data: one line per cycle of the page being returned
    rdata_valid <= 1'b0;
    if (rline < 0) begin
      foreach (rq[i]) if (rq[i].due <= cyc) begin cur = rq[i]; rq.delete(i); rline = 0; break; end
    end
    if (rline >= 0) begin
      rdata_valid <= 1'b1;
      rdata.tag  <= cur.tag;
      rdata.data <= line_of(cur.k, rline);
      rdata.last <= (rline == PAGE_LINES - 1);
      rline = (rline == PAGE_LINES - 1) ? -1 : rline + 1;
    end
  end

  function automatic line_t line_of(pkey_t k, int l);
    logic [37:0] a = {k, 7'(l)};
    return lines.exists(a) ? lines[a] : '0;
  endfunction

  initial begin rdata_valid = 0; rdata = '0; ack_valid = 0; ack = '0; end
endmodule
