// tb_moga_parallel: end-to-end test of the parallel architecture at its
// default size (one normal and two biased islands of 64 individuals, migration
// every 256 clocks), running RUN_CYCLES clocks: 1,000,000 evaluations per
// island, the run length of the algorithm's published knapsack experiments.
// Checks:
//   * every island evaluates exactly one offspring per clock while running;
//   * at every migration clock the normal island receives the relation
//     module's choice among the biased islands' emigrants (the one no other
//     dominates) and every biased island receives the normal island's emigrant;
//   * after the run, every stored fitness of every island equals an
//     independent evaluation of the stored chromosome;
//   * each mechanism happened in each island: migration, write forwarding,
//     crossover, mutation, policy 1 and policy 3 writes, duplicate rejection;
//     and the relation module chose each biased island at least once.
// It reports the non-dominated set found over all islands and, per island,
// the best value of each objective.
module tb_moga_parallel;
  import moga_pkg::*;
  `include "tb/moga_tb_util.svh"
  localparam int RUN_CYCLES = 1_000_000;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_done, host_rd;
  logic [1:0] host_isl;
  addr_t host_addr;
  indiv_t hq;
  logic [31:0] evals [N_ISL];
  logic [N_ISL-1:0] mig, bypass, dup, xo, mut;
  wr_kind_e kind [N_ISL];
  logic [$clog2(N_OBJ+1)-1:0] rel_idx;

  moga_parallel dut (.clk, .rst_n, .run, .init_done_o(init_done), .host_rd_i(host_rd),
                     .host_island_i(host_isl), .host_addr_i(host_addr), .host_q_o(hq),
                     .eval_cnt_o(evals), .mig_o(mig), .bypass_o(bypass), .wr_kind_o(kind),
                     .dup_rej_o(dup), .xo_o(xo), .mut_o(mut), .rel_idx_o(rel_idx));

  int n_mig [N_ISL], n_bypass [N_ISL], n_xo [N_ISL], n_mut [N_ISL], n_dup [N_ISL];
  int n_par [N_ISL], n_free [N_ISL];
  int n_rel [N_OBJ];
  int mig_bad = 0;

  initial begin
    foreach (n_mig[g]) begin
      n_mig[g] = 0; n_bypass[g] = 0; n_xo[g] = 0; n_mut[g] = 0; n_dup[g] = 0; n_par[g] = 0; n_free[g] = 0;
    end
    foreach (n_rel[k]) n_rel[k] = 0;
  end

  // Migration checker, sampled just before each clock edge.
  always @(negedge clk) if (rst_n && run && mig != '0) begin
    automatic indiv_t best = dut.emig[1];
    automatic int bi = 0;
    automatic int bad0 = mig_bad;
    for (int k = 1; k < N_OBJ; k++)
      if (ref_dom(dut.emig[k+1].fit, best.fit)) begin best = dut.emig[k+1]; bi = k; end
    if (mig != '1) mig_bad++;
    if (dut.g_isl[0].u_isl.xo_in.chrom !== best.chrom || dut.g_isl[0].u_isl.xo_in.fit !== best.fit ||
        int'(rel_idx) != bi) mig_bad++;
    // the package fixes two objectives, hence biased islands 1 and 2
    if (dut.g_isl[1].u_isl.xo_in.chrom !== dut.emig[0].chrom) mig_bad++;
    if (dut.g_isl[2].u_isl.xo_in.chrom !== dut.emig[0].chrom) mig_bad++;
    n_rel[bi]++;
    checks++;
    if (mig_bad != bad0) failures++;
  end

  always @(posedge clk) if (rst_n && run) begin
    for (int g = 0; g < N_ISL; g++) begin
      n_mig[g] += mig[g]; n_bypass[g] += bypass[g]; n_xo[g] += xo[g]; n_mut[g] += mut[g];
      n_dup[g] += dup[g];
      if (kind[g] == WR_PARENT) n_par[g]++;
      if (kind[g] == WR_FREE)   n_free[g]++;
    end
  end

  initial begin
    repeat (RUN_CYCLES + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0 [N_ISL];
    chrom_t  c [N_ISL*POP_SIZE];
    fitvec_t f [N_ISL*POP_SIZE];
    int nd = 0;
    host_rd = 0; host_isl = '0; host_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1; run = 1;
    wait (init_done);
    @(negedge clk);
    foreach (e0[g]) e0[g] = evals[g];
    repeat (RUN_CYCLES) @(posedge clk);
    @(negedge clk);
    run = 0;
    for (int g = 0; g < N_ISL; g++) begin
      checks++;
      if (evals[g] - e0[g] < RUN_CYCLES - 6 || evals[g] - e0[g] > RUN_CYCLES + 1) begin
        failures++; $display("island %0d: %0d evaluations in %0d clocks", g, evals[g] - e0[g], RUN_CYCLES);
      end
    end
    repeat (POP_SIZE + 20) @(negedge clk);
    for (int g = 0; g < N_ISL; g++)
      for (int a = 0; a < POP_SIZE; a++) begin
        host_rd = 1; host_isl = 2'(g); host_addr = addr_t'(a);
        @(posedge clk); #1;
        c[g*POP_SIZE+a] = hq.chrom; f[g*POP_SIZE+a] = hq.fit;
        checks++;
        if (!hq.valid || hq.fit !== ref_eval(hq.chrom)) failures++;
        @(negedge clk);
      end
    host_rd = 0;
    // non-dominated distinct fitness vectors over all islands
    for (int i = 0; i < N_ISL*POP_SIZE; i++) begin
      automatic bit keep = 1;
      for (int j = 0; j < N_ISL*POP_SIZE; j++)
        if (ref_dom(f[j], f[i]) || (j < i && f[j] == f[i])) keep = 0;
      if (keep) begin
        nd++;
        $display("  front point %0d %0d", f[i][0], f[i][1]);
      end
    end
    for (int g = 0; g < N_ISL; g++) begin
      int m0 = 0, m1 = 0;
      for (int a = 0; a < POP_SIZE; a++) begin
        if (int'(f[g*POP_SIZE+a][0]) > m0) m0 = int'(f[g*POP_SIZE+a][0]);
        if (int'(f[g*POP_SIZE+a][1]) > m1) m1 = int'(f[g*POP_SIZE+a][1]);
      end
      $display("island %0d (%s): best objective0 %0d objective1 %0d | mig %0d bypass %0d xo %0d mut %0d parent %0d free %0d dup %0d",
               g, g == 0 ? "normal" : "biased", m0, m1, n_mig[g], n_bypass[g], n_xo[g], n_mut[g],
               n_par[g], n_free[g], n_dup[g]);
      checks++;
      if (n_mig[g] == 0 || n_bypass[g] == 0 || n_xo[g] == 0 || n_mut[g] == 0 || n_par[g] == 0 ||
          n_free[g] == 0 || n_dup[g] == 0) failures++;
    end
    $display("non-dominated solutions found: %0d; relation choices %0d/%0d; migration errors %0d",
             nd, n_rel[0], n_rel[1], mig_bad);
    checks++;
    for (int k = 0; k < N_OBJ; k++) if (n_rel[k] == 0) failures++;
    checks++;
    if (nd < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
