// tb_moga_immigration: self-checking test of the migration point.
// With INTERVAL = 5, random local and immigrant individuals are applied. While
// enabled, every fifth clock (counted from the enable) must replace the local
// chromosome and fitness by the immigrant's, keeping the local address; all
// other clocks, and all clocks while disabled, pass the local individual.
module tb_moga_immigration;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  indiv_t loc, imm, out, emig;
  logic mig;
  moga_immigration #(.INTERVAL(5)) dut (.clk, .rst_n, .en, .local_i(loc), .imm_i(imm),
                                        .out_o(out), .emig_o(emig), .mig_o(mig));

  function automatic indiv_t rnd_ind();
    indiv_t x;
    x = '0;
    x.valid = 1'b1;
    x.addr  = addr_t'($urandom());
    x.chrom = {$urandom(), $urandom()};
    x.fit   = {$urandom()};
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase = 0, n_mig = 0;
    loc = '0; imm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t == 20)   begin en = 1; phase = 0; end
      if (t == 1500) en = 0;
      loc = rnd_ind();
      imm = rnd_ind();
      #1;
      begin
        automatic bit exp_mig = en && (phase % 5 == 4);
        automatic indiv_t e = loc;
        if (exp_mig) begin e.chrom = imm.chrom; e.fit = imm.fit; end
        checks++;
        if (mig !== exp_mig || out !== e || emig !== loc) begin
          failures++;
          if (failures < 10) $display("t=%0d mig=%b exp=%b", t, mig, exp_mig);
        end
        if (mig) n_mig++;
      end
      if (en) phase++;
    end
    checks++;
    if (n_mig != 296) begin failures++; $display("migrations %0d", n_mig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
