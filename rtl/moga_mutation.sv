// moga_mutation: bit-flip mutation of the offspring chromosome.
//
// Every chromosome bit is inverted independently with probability
// MUT_RATE/256 (default 10/256, about 0.04 per bit). Each bit draws its own
// 8-bit random number per clock. The parent address and fitness chosen by
// crossover are passed on unchanged. Initial-load records are not mutated.
// Timing: out_o registered, one clock after in_i; one record per clock.
module moga_mutation
  import moga_pkg::*;
#(
  parameter int          MUT_RATE = 10,   // 0.04 * 256
  parameter logic [31:0] SEED     = 32'hBB67_AE85
) (
  input  logic clk,
  input  logic rst_n,
  input  off_t in_i,
  output off_t out_o,
  output logic mut_o      // at least one bit of the record on out_o was flipped
);
  logic [N_BITS*8-1:0] rnd;
  moga_rng #(.W(N_BITS*8), .SEED(SEED)) u_rng (.clk(clk), .rst_n(rst_n), .en(1'b1), .rnd_o(rnd));

  chrom_t flip;
  always_comb begin
    for (int b = 0; b < N_BITS; b++)
      flip[b] = ({24'd0, rnd[b*8 +: 8]} < 32'(MUT_RATE));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_o <= '0;
      mut_o <= 1'b0;
    end else begin
      out_o <= in_i;
      mut_o <= 1'b0;
      if (in_i.valid && !in_i.init) begin
        out_o.chrom <= in_i.chrom ^ flip;
        mut_o       <= |flip;
      end
    end
  end
endmodule
