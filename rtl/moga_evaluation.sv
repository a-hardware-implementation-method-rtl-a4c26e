// moga_evaluation: objective values of the offspring for the multi-objective
// 0/1 knapsack problem (N_OBJ knapsacks, N_BITS items).
//
// Chromosome bit i set means item i is packed. For every knapsack k the module
// adds up the profits and the weights of the packed items (constant tables
// from moga_pkg). If every knapsack is within its capacity, objective k is the
// profit sum of knapsack k; if any knapsack is overfull, all objectives are 0.
// The evaluation itself is the algorithm's; the way overfull solutions are
// scored is this design's own choice.
// Timing: one record per clock, out_o registered one clock after in_i, with
// out_o.fit filled in and everything else passed through.
module moga_evaluation
  import moga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  off_t in_i,
  output off_t out_o
);
  typedef logic [N_OBJ-1:0][FIT_W-1:0] sum_t;

  function automatic sum_t profit_table_sum(chrom_t c, bit weights);
    sum_t s;
    for (int k = 0; k < N_OBJ; k++) begin
      s[k] = '0;
      for (int i = 0; i < N_BITS; i++)
        if (c[i]) s[k] += FIT_W'(weights ? item_weight(k, i) : item_profit(k, i));
    end
    return s;
  endfunction

  sum_t psum, wsum;
  logic feasible;
  always_comb begin
    psum     = profit_table_sum(in_i.chrom, 1'b0);
    wsum     = profit_table_sum(in_i.chrom, 1'b1);
    feasible = 1'b1;
    for (int k = 0; k < N_OBJ; k++)
      if (32'(wsum[k]) > capacity(k)) feasible = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_o <= '0;
    else begin
      out_o     <= in_i;
      out_o.fit <= feasible ? fitvec_t'(psum) : '0;
    end
  end
endmodule
