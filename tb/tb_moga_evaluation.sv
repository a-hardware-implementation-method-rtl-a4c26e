// tb_moga_evaluation: self-checking test of the knapsack evaluation.
// Random chromosomes with varying density (so both feasible and overfull
// solutions occur) are evaluated; the fitness one clock later is compared with
// a reference computed here item by item from the item tables. Other fields
// must pass unchanged.
module tb_moga_evaluation;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  off_t in, out;
  moga_evaluation dut (.clk, .rst_n, .in_i(in), .out_o(out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_feas = 0, n_over = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned p [N_OBJ];
      int unsigned w [N_OBJ];
      int unsigned cap [N_OBJ];
      bit ok;
      automatic int dens = $urandom_range(0, 100);
      @(negedge clk);
      in = '0;
      in.valid = 1'b1;
      for (int b = 0; b < N_BITS; b++) in.chrom[b] = ($urandom_range(0, 99) < dens);
      in.par_addr = addr_t'($urandom());
      in.par_fit  = {$urandom()};
      ok = 1;
      for (int k = 0; k < N_OBJ; k++) begin
        p[k] = 0; w[k] = 0; cap[k] = 0;
        for (int i = 0; i < N_BITS; i++) begin
          cap[k] += item_weight(k, i);
          if (in.chrom[i]) begin p[k] += item_profit(k, i); w[k] += item_weight(k, i); end
        end
        cap[k] = cap[k] / 2;
        if (w[k] > cap[k]) ok = 0;
      end
      @(posedge clk); #1;
      checks++;
      for (int k = 0; k < N_OBJ; k++)
        if (out.fit[k] !== FIT_W'(ok ? p[k] : 0)) begin
          failures++;
          if (failures < 10) $display("t=%0d obj %0d got %0d exp %0d", t, k, out.fit[k], ok ? p[k] : 0);
        end
      if (out.chrom !== in.chrom || out.par_addr !== in.par_addr || out.par_fit !== in.par_fit || !out.valid)
        failures++;
      if (ok) n_feas++; else n_over++;
    end
    checks++;
    if (n_feas < 100 || n_over < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
