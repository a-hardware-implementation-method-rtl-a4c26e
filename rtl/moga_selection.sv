// moga_selection: decides whether the offspring should replace the chosen parent.
//
// Normal selection (BIASED = 0): the selected flag is set when the offspring
// dominates the parent over all objectives. Biased selection (BIASED = 1): it
// is set when the offspring is strictly better than the parent in the single
// objective BIAS_OBJ. Initial-load records are always selected (their own
// address is the target). The output record starts the overlap rejection chain
// with found = 0 and nothing written yet.
// Timing: out_o registered, one clock after in_i; one record per clock.
module moga_selection
  import moga_pkg::*;
#(
  parameter bit BIASED   = 1'b0,
  parameter int BIAS_OBJ = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  off_t in_i,
  output orm_t out_o
);
  logic sel;
  always_comb begin
    if (in_i.init)   sel = 1'b1;
    else if (BIASED) sel = in_i.fit[BIAS_OBJ] > in_i.par_fit[BIAS_OBJ];
    else             sel = dominates(in_i.fit, in_i.par_fit);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_o <= '0;
    else out_o <= '{valid: in_i.valid, init: in_i.init, chrom: in_i.chrom, fit: in_i.fit,
                    selected: in_i.valid && sel, ow_addr: in_i.par_addr, found: 1'b0,
                    wr: WR_NONE, wr_addr: '0};
  end

  initial assert (BIAS_OBJ >= 0 && BIAS_OBJ < N_OBJ) else $error("BIAS_OBJ out of range");
endmodule
