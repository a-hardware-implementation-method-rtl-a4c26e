// moga_parallel: the parallel MOGA architecture, N_OBJ + 1 islands run side by side.
//
// Island 0 uses normal selection (Pareto dominance). Island 1 + k uses biased
// selection on objective k, so every objective has an island that pushes the
// search towards its own edge of the Pareto front. Every MIG_INTERVAL clocks
// all islands migrate in the same clock:
//   * the relation module takes the individuals the biased islands offer and
//     passes the dominating one to the normal island;
//   * the individual the normal island offers is copied to every biased island.
// An immigrant enters crossover in place of a local individual (see
// moga_immigration).
//
// Interface: raise run to let the islands work (each first loads and evaluates
// a random population); init_done_o rises once every island has done so. With
// run low the populations can be read: host_island_i and host_addr_i select an
// individual, host_rd_i reads it, host_q_o holds it one clock later.
// eval_cnt_o gives the evaluations done per island; the remaining outputs
// flag, per island and clock, the events of the algorithm (migration, write
// forwarding, crossover, mutation, write kind, duplicate rejection).
module moga_parallel
  import moga_pkg::*;
#(
  parameter int          POP          = POP_SIZE,
  parameter int          MIG_INTERVAL = 256,
  parameter int          XO_RATE      = 102,
  parameter int          MUT_RATE     = 10,
  parameter logic [31:0] SEED         = 32'hC0FF_EE11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic         init_done_o,
  input  logic         host_rd_i,
  input  logic [1:0]   host_island_i,
  input  addr_t        host_addr_i,
  output indiv_t       host_q_o,
  output logic [31:0]  eval_cnt_o [N_ISL],
  output logic [N_ISL-1:0] mig_o,
  output logic [N_ISL-1:0] bypass_o,
  output wr_kind_e     wr_kind_o [N_ISL],
  output logic [N_ISL-1:0] dup_rej_o,
  output logic [N_ISL-1:0] xo_o,      // crossover applied, per island
  output logic [N_ISL-1:0] mut_o,     // mutation flipped a bit, per island
  output logic [$clog2(N_OBJ+1)-1:0] rel_idx_o  // biased island chosen by relation
);
  indiv_t imm [N_ISL];
  indiv_t emig [N_ISL];
  indiv_t host_q [N_ISL];
  logic [N_ISL-1:0] init_done;
  logic mig_en;

  assign init_done_o = &init_done;
  assign mig_en      = init_done_o && run;

  for (genvar g = 0; g < N_ISL; g++) begin : g_isl
    moga_island #(
      .POP(POP), .BIASED(g != 0), .BIAS_OBJ(g == 0 ? 0 : g - 1),
      .MIG_INTERVAL(MIG_INTERVAL), .XO_RATE(XO_RATE), .MUT_RATE(MUT_RATE),
      .SEED(SEED + 32'h3C6E_F372 * g)
    ) u_isl (
      .clk(clk), .rst_n(rst_n), .run(run), .mig_en(mig_en),
      .imm_i(imm[g]), .emig_o(emig[g]), .init_done_o(init_done[g]),
      .mig_o(mig_o[g]), .bypass_o(bypass_o[g]), .xo_o(xo_o[g]), .mut_o(mut_o[g]),
      .wr_kind_o(wr_kind_o[g]), .dup_rej_o(dup_rej_o[g]), .eval_cnt_o(eval_cnt_o[g]),
      .host_rd_i(host_rd_i && host_island_i == 2'(g)), .host_addr_i(host_addr_i),
      .host_q_o(host_q[g])
    );
  end

  // Relation module: biased islands -> normal island.
  indiv_t biased_emig [N_OBJ];
  for (genvar k = 0; k < N_OBJ; k++) begin : g_bemig
    assign biased_emig[k] = emig[k+1];
  end
  moga_relation #(.NB(N_OBJ)) u_rel (.cand_i(biased_emig), .best_o(imm[0]), .idx_o(rel_idx_o));

  // Normal island -> every biased island.
  for (genvar k = 1; k < N_ISL; k++) begin : g_dup
    assign imm[k] = emig[0];
  end

  always_comb begin
    host_q_o = '0;
    for (int g = 0; g < N_ISL; g++)
      if (host_q[g].valid) host_q_o = host_q[g];
  end
endmodule
