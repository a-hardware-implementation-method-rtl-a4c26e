// moga_overlap_rejection: the overlap rejection module, a chain of POP stages,
// one per population slot (see moga_orm_sub for the per-slot rule).
//
// The record from selection enters stage 0 and moves one stage per clock, so
// every offspring meets every individual of the population in address order,
// and consecutive offspring see each other's updates. When a record leaves the
// last stage and was written somewhere (policy 1, policy 3 or the initial
// load), the module issues the population write wr_o to the management module:
// address, chromosome and fitness of the offspring. At most one offspring leaves
// per clock, so there is at most one write per clock. Issuing the write from
// the end of the chain is this design's choice.
// Timing: latency POP clocks from in_i to wr_o; throughput one offspring per clock.
module moga_overlap_rejection
  import moga_pkg::*;
#(
  parameter int POP = POP_SIZE
) (
  input  logic     clk,
  input  logic     rst_n,
  input  orm_t     in_i,
  output indiv_t   wr_o,
  output wr_kind_e wr_kind_o,     // why the record leaving now was written
  output logic     dup_rej_o,     // record leaving now was dropped as a duplicate
  output fitvec_t  fit_p_o [POP], // stored fitness of every slot
  output logic     free_o  [POP]
);
  orm_t chain [POP+1];
  assign chain[0] = in_i;

  for (genvar i = 0; i < POP; i++) begin : g_sub
    moga_orm_sub #(.IDX(i)) u_sub (
      .clk(clk), .rst_n(rst_n), .in_i(chain[i]), .out_o(chain[i+1]),
      .fit_p_o(fit_p_o[i]), .free_o(free_o[i])
    );
  end

  orm_t last;
  assign last = chain[POP];

  assign wr_o = '{valid: last.valid && (last.wr != WR_NONE), init: last.init,
                  addr: last.wr_addr, chrom: last.chrom, fit: last.fit};
  assign wr_kind_o = last.valid ? last.wr : WR_NONE;
  assign dup_rej_o = last.valid && !last.init && last.found && (last.wr == WR_NONE);

  initial assert (POP >= 1 && POP <= 2**ADDR_W) else $error("POP out of range");

  // An offspring is written at most once, and only after it was marked found.
  a_wr_found: assert property (@(posedge clk) disable iff (!rst_n)
    (last.valid && last.wr != WR_NONE) |-> last.found);
endmodule
