// tb_moga_orm_sub: self-checking test of one overlap rejection stage (slot 3).
// Random records with fitness values from a tiny range (so equal fitness is
// common), random found/selected flags and parent addresses near the slot are
// applied; output record, stored fitness and free flag are compared each clock
// with the reference rule. Every branch of the rule must occur.
module tb_moga_orm_sub;
  import moga_pkg::*;
  `include "tb/moga_orm_ref.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  orm_t in, out;
  fitvec_t fp;
  logic fr;
  moga_orm_sub #(.IDX(3)) dut (.clk, .rst_n, .in_i(in), .out_o(out), .fit_p_o(fp), .free_o(fr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fitvec_t mfp = '0;
    bit mfr = 0;
    int n_kind [4] = '{0, 0, 0, 0};
    int n_free_set = 0, n_dup = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      orm_t e;
      bit fr_before;
      @(negedge clk);
      in = '0;
      in.valid    = ($urandom_range(0, 9) != 0);
      in.init     = ($urandom_range(0, 29) == 0);
      in.chrom    = {$urandom(), $urandom()};
      in.fit[0]   = FIT_W'($urandom_range(0, 2));
      in.fit[1]   = FIT_W'($urandom_range(0, 2));
      in.selected = $urandom_range(0, 1);
      in.ow_addr  = addr_t'($urandom_range(2, 4));
      in.found    = ($urandom_range(0, 3) == 0);
      fr_before   = mfr;
      e = orm_ref_step(in, 3, mfp, mfr);
      @(posedge clk); #1;
      checks++;
      if (out !== e || fp !== mfp || fr !== mfr) begin
        failures++;
        if (failures < 10) $display("t=%0d out/exp wr %0d/%0d found %b/%b free %b/%b", t, out.wr, e.wr, out.found, e.found, fr, mfr);
      end
      n_kind[e.wr]++;
      if (!fr_before && mfr) n_free_set++;
      if (in.valid && !in.found && !in.init && e.found && e.wr == WR_NONE) n_dup++;
    end
    checks++;
    if (n_kind[WR_PARENT] == 0 || n_kind[WR_FREE] == 0 || n_kind[WR_INIT] == 0 || n_free_set == 0 || n_dup == 0)
      failures++;
    $display("parent %0d free %0d init %0d freeset %0d dup %0d", n_kind[1], n_kind[2], n_kind[3], n_free_set, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
