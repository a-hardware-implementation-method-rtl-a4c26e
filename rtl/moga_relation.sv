// moga_relation: picks the emigrant for the normal island from the biased islands.
//
// The NB biased islands each offer one individual (cand_i). Scanning them in
// order, the module keeps a running choice and replaces it with a candidate
// that dominates it, so the result is a candidate that no later candidate
// dominates; when one candidate dominates all others it is that one. Invalid
// candidates are skipped. The scan order and the tie rule (earliest wins when
// none dominates) are this design's own choices.
// Timing: combinational.
module moga_relation
  import moga_pkg::*;
#(
  parameter int NB = N_OBJ
) (
  input  indiv_t cand_i [NB],
  output indiv_t best_o,
  output logic [$clog2(NB+1)-1:0] idx_o   // index of the chosen candidate
);
  always_comb begin
    best_o = '0;
    idx_o  = '0;
    for (int c = 0; c < NB; c++) begin
      if (cand_i[c].valid && (!best_o.valid || dominates(cand_i[c].fit, best_o.fit))) begin
        best_o = cand_i[c];
        idx_o  = ($clog2(NB+1))'(c);
      end
    end
  end
endmodule
