// tb_moga_mutation: self-checking test of bit-flip mutation.
// Records go through an instance with the default rate (10/256 per bit) and
// one with rate 0. Checks: parent fields pass unchanged; initial-load records
// and the rate-0 instance leave the chromosome alone; the measured flip rate of
// the default instance over 4000 chromosomes (200000 bits) lies within
// 0.032..0.046 (expected 0.039); mut_o agrees with the observed change.
module tb_moga_mutation;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  off_t in, out, out0;
  logic mut, mut0;
  moga_mutation                  dut  (.clk, .rst_n, .in_i(in), .out_o(out),  .mut_o(mut));
  moga_mutation #(.MUT_RATE(0))  dut0 (.clk, .rst_n, .in_i(in), .out_o(out0), .mut_o(mut0));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint flips = 0, bits = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4200; t++) begin
      @(negedge clk);
      in = '0;
      in.valid = 1'b1;
      in.init  = (t % 20 == 7);
      in.chrom = {$urandom(), $urandom()};
      in.fit   = {$urandom()};
      in.par_addr = addr_t'($urandom());
      in.par_fit  = {$urandom()};
      @(posedge clk); #1;
      checks++;
      if (out.par_addr !== in.par_addr || out.par_fit !== in.par_fit || out.init !== in.init ||
          !out.valid || out0.chrom !== in.chrom || mut0) failures++;
      if (in.init) begin
        checks++;
        if (out.chrom !== in.chrom || mut) failures++;
      end else begin
        checks++;
        if (mut !== (out.chrom != in.chrom)) failures++;
        flips += $countones(out.chrom ^ in.chrom);
        bits  += N_BITS;
      end
    end
    checks++;
    $display("flip rate %0d / %0d", flips, bits);
    if (flips * 1000 < bits * 32 || flips * 1000 > bits * 46) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
