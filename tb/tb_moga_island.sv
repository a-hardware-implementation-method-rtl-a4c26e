// tb_moga_island: end-to-end test of one pipeline (basic architecture, normal
// selection, 64 individuals), migration disabled: the single-island
// configuration, run for 1,000,000 evaluations as in the published knapsack
// experiments.
// The island loads and evaluates its random population, runs RUN_CYCLES
// clocks, is stopped, drains, and its population is read back. Checks:
//   * exactly one evaluation per clock while running;
//   * every stored fitness equals an independent evaluation of the stored
//     chromosome, and equals the copy kept in the overlap rejection chain;
//   * the best individuals improved on the initial population (the number of
//     individuals with nonzero fitness, and the best profit sum, did not drop);
//   * forwarding, crossover, mutation, policy 1 and policy 3 writes and
//     duplicate rejections all happened.
module tb_moga_island;
  import moga_pkg::*;
  `include "tb/moga_tb_util.svh"
  localparam int RUN_CYCLES = 1_000_000;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  indiv_t emig, hq;
  logic init_done, mig, bypass, xo, mut, dup, host_rd;
  wr_kind_e kind;
  logic [31:0] evals;
  addr_t host_addr;
  moga_island dut (.clk, .rst_n, .run, .mig_en(1'b0), .imm_i('0), .emig_o(emig),
                   .init_done_o(init_done), .mig_o(mig), .bypass_o(bypass), .xo_o(xo), .mut_o(mut),
                   .wr_kind_o(kind), .dup_rej_o(dup), .eval_cnt_o(evals),
                   .host_rd_i(host_rd), .host_addr_i(host_addr), .host_q_o(hq));

  int n_bypass = 0, n_xo = 0, n_mut = 0, n_dup = 0, n_mig = 0;
  int n_kind [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    n_bypass += bypass; n_xo += xo; n_mut += mut; n_dup += dup; n_mig += mig;
    n_kind[kind]++;
  end

  initial begin
    repeat (RUN_CYCLES + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_pop(output chrom_t c [POP_SIZE], output fitvec_t f [POP_SIZE]);
    for (int a = 0; a < POP_SIZE; a++) begin
      @(negedge clk);
      host_rd = 1; host_addr = addr_t'(a);
      @(posedge clk); #1;
      c[a] = hq.chrom; f[a] = hq.fit;
    end
    @(negedge clk);
    host_rd = 0;
  endtask

  int n_front;
  task automatic check_pop(output int nz, output int best);
    chrom_t c [POP_SIZE];
    fitvec_t f [POP_SIZE];
    read_pop(c, f);
    nz = 0; best = 0;
    for (int a = 0; a < POP_SIZE; a++) begin
      checks++;
      if (f[a] !== ref_eval(c[a]) || f[a] !== dut.orm_fit[a]) begin
        failures++;
        if (failures < 10) $display("slot %0d: fit %0d/%0d ref %0d/%0d", a, f[a][0], f[a][1], ref_eval(c[a]) >> 16, ref_eval(c[a]) & 16'hffff);
      end
      if (f[a] != '0) nz++;
      if (int'(f[a][0]) + int'(f[a][1]) > best) best = int'(f[a][0]) + int'(f[a][1]);
    end
    n_front = 0;
    for (int i = 0; i < POP_SIZE; i++) begin
      automatic bit keep = 1;
      for (int j = 0; j < POP_SIZE; j++) if (ref_dom(f[j], f[i]) || (j < i && f[j] == f[i])) keep = 0;
      n_front += keep;
    end
  endtask

  initial begin
    int nz0, best0, nz1, best1, e0, cyc;
    host_rd = 0; host_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    check_pop(nz0, best0);
    @(negedge clk);
    run = 1;
    e0 = evals;
    cyc = 0;
    repeat (RUN_CYCLES) begin @(posedge clk); cyc++; end
    @(negedge clk);
    run = 0;
    checks++;
    // the first offspring needs two individuals and four pipeline clocks
    if (evals - e0 < RUN_CYCLES - 6 || evals - e0 > RUN_CYCLES) begin
      failures++; $display("evaluations %0d in %0d clocks", evals - e0, RUN_CYCLES);
    end
    repeat (POP_SIZE + 20) @(negedge clk);
    check_pop(nz1, best1);
    $display("nonzero %0d -> %0d, best sum %0d -> %0d, non-dominated %0d", nz0, nz1, best0, best1, n_front);
    $display("bypass %0d xo %0d mut %0d parent %0d free %0d dup %0d", n_bypass, n_xo, n_mut,
             n_kind[WR_PARENT], n_kind[WR_FREE], n_dup);
    checks++;
    if (nz1 < nz0 || best1 <= best0) failures++;
    checks++;
    if (n_bypass == 0 || n_xo == 0 || n_mut == 0 || n_kind[WR_PARENT] == 0 || n_kind[WR_FREE] == 0 ||
        n_dup == 0 || n_mig != 0 || n_kind[WR_INIT] != POP_SIZE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
