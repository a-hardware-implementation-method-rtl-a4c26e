// moga_crossover: pairs consecutive individuals, applies Half Uniform Crossover
// (HUX) and picks the parent that the offspring may replace.
//
// Register r keeps the individual received one chromosome earlier (parent1);
// the one arriving now is parent2. With probability XO_RATE/256 the offspring
// is parent1 with exactly half of the bits in which the parents differ taken
// from parent2: the differing bits are numbered in order, grouped in pairs
// (0,1), (2,3), ..., and one random member of every pair is exchanged (an odd
// last bit is exchanged with probability one half). Otherwise the offspring is
// a copy of parent1. Pairs overlap (x0,x1), (x1,x2), ..., so one offspring
// leaves per clock.
//
// Replacement parent: the parents' fitness vectors are compared; the dominated
// one is forwarded (address and fitness) for the selection step, and parent1
// when neither dominates the other.
//
// Initial-load records pass straight through (offspring = their chromosome,
// parent address = their own address) and clear r.
// Timing: out_o registered, one clock after in_i. One chromosome per clock
// (the whole chromosome travels on one bus word).
module moga_crossover
  import moga_pkg::*;
#(
  parameter int          XO_RATE = 102,  // 0.4 * 256
  parameter logic [31:0] SEED    = 32'h6A09_E667
) (
  input  logic   clk,
  input  logic   rst_n,
  input  indiv_t in_i,
  output off_t   out_o,
  output logic   xo_o      // crossover was applied to the offspring now on out_o
);
  localparam int NPAIR = (N_BITS + 1) / 2;

  indiv_t r;
  logic [63:0] rnd;
  moga_rng #(.W(64), .SEED(SEED)) u_rng (.clk(clk), .rst_n(rst_n), .en(1'b1), .rnd_o(rnd));

  logic [NPAIR-1:0] pick;   // per pair: which member is exchanged
  logic [7:0]       xo_draw;
  assign pick    = rnd[NPAIR-1:0];
  assign xo_draw = rnd[63:56];

  chrom_t diff, swap, child;
  always_comb begin
    int unsigned rank;
    diff = r.chrom ^ in_i.chrom;
    swap = '0;
    rank = 0;
    for (int b = 0; b < N_BITS; b++) begin
      if (diff[b]) begin
        swap[b] = (rank[0] == pick[rank / 2]);
        rank++;
      end
    end
  end

  logic do_xo, pair_ok;
  assign pair_ok = in_i.valid && !in_i.init && r.valid;
  assign do_xo   = ({24'd0, xo_draw} < 32'(XO_RATE));
  assign child   = do_xo ? (r.chrom ^ swap) : r.chrom;

  logic p2_dom;
  assign p2_dom = dominates(in_i.fit, r.fit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r     <= '0;
      out_o <= '0;
      xo_o  <= 1'b0;
    end else begin
      out_o <= '0;
      xo_o  <= 1'b0;
      if (in_i.valid && in_i.init) begin
        out_o <= '{valid: 1'b1, init: 1'b1, chrom: in_i.chrom, fit: '0,
                   par_addr: in_i.addr, par_fit: in_i.fit};
        r     <= '0;
      end else if (in_i.valid) begin
        r <= in_i;
        if (pair_ok) begin
          xo_o  <= do_xo;
          out_o <= '{valid: 1'b1, init: 1'b0, chrom: child, fit: '0,
                     par_addr: p2_dom ? r.addr : (dominates(r.fit, in_i.fit) ? in_i.addr : r.addr),
                     par_fit:  p2_dom ? r.fit  : (dominates(r.fit, in_i.fit) ? in_i.fit  : r.fit)};
        end
      end
    end
  end
endmodule
