// tb_moga_relation: self-checking test of the relation module.
// Two instances: the default (two biased islands) and one with four
// candidates. Random candidates with small fitness values are applied; the
// choice must be valid whenever any candidate is, must not be dominated by any
// candidate, and must be the candidate that dominates all others when one does.
// For two candidates the exact expected choice is also checked.
module tb_moga_relation;
  import moga_pkg::*;
  int checks = 0, failures = 0;

  indiv_t c2 [2];
  indiv_t c4 [4];
  indiv_t b2, b4;
  logic [1:0] i2;
  logic [2:0] i4;
  moga_relation              dut2 (.cand_i(c2), .best_o(b2), .idx_o(i2));
  moga_relation #(.NB(4))    dut4 (.cand_i(c4), .best_o(b4), .idx_o(i4));

  function automatic bit ref_dom(fitvec_t a, fitvec_t b);
    return (a[0] >= b[0]) && (a[1] >= b[1]) && ((a[0] > b[0]) || (a[1] > b[1]));
  endfunction

  function automatic indiv_t rnd_ind();
    indiv_t x;
    x = '0;
    x.valid = ($urandom_range(0, 9) != 0);
    x.addr  = addr_t'($urandom());
    x.chrom = {$urandom(), $urandom()};
    x.fit[0] = FIT_W'($urandom_range(0, 4));
    x.fit[1] = FIT_W'($urandom_range(0, 4));
    return x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int picked1 = 0;
    for (int t = 0; t < 4000; t++) begin
      indiv_t exp2;
      automatic bit any4 = 0, bad = 0;
      automatic int dom_all = -1;
      foreach (c2[i]) c2[i] = rnd_ind();
      foreach (c4[i]) c4[i] = rnd_ind();
      #1;
      // two candidates: exact
      if (c2[0].valid && c2[1].valid) exp2 = ref_dom(c2[1].fit, c2[0].fit) ? c2[1] : c2[0];
      else if (c2[0].valid) exp2 = c2[0];
      else if (c2[1].valid) exp2 = c2[1];
      else exp2 = '0;
      checks++;
      if (b2 !== exp2) begin failures++; if (failures < 10) $display("NB=2 mismatch t=%0d", t); end
      if (b2.valid && b2 === c2[1] && c2[1] !== c2[0]) picked1++;
      // four candidates: properties
      for (int i = 0; i < 4; i++) if (c4[i].valid) begin
        automatic bit all = 1;
        any4 = 1;
        for (int j = 0; j < 4; j++) if (j != i && c4[j].valid && !ref_dom(c4[i].fit, c4[j].fit)) all = 0;
        if (all) dom_all = i;
        if (b4.valid && ref_dom(c4[i].fit, b4.fit)) bad = 1;
      end
      checks++;
      if (b4.valid !== any4 || bad || (dom_all >= 0 && b4 !== c4[dom_all]) ||
          (b4.valid && b4 !== c4[i4])) begin
        failures++;
        if (failures < 10) $display("NB=4 mismatch t=%0d", t);
      end
    end
    checks++;
    if (picked1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
