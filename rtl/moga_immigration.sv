// moga_immigration: migration point between management and crossover (island model).
//
// Most clocks the individual read from the island's own population (local_i)
// passes to crossover unchanged. Every INTERVAL-th clock while migration is
// enabled, the individual arriving from another island (imm_i) takes its place:
// crossover then pairs it with a local individual, so the immigrant's genes
// enter this island through its offspring. The immigrant keeps the local
// address of the individual it displaced; should it be chosen as the parent to
// be replaced, the offspring goes to that local slot. The local individual is
// always offered to the other islands on emig_o.
//
// All islands see the same enable from reset onwards, so their interval
// counters, and hence their migration clocks, agree. The interval length and
// the address rule are this design's own choices.
// Timing: purely combinational from local_i/imm_i to out_o; mig_o marks the
// clock on which out_o carries an immigrant.
module moga_immigration
  import moga_pkg::*;
#(
  parameter int INTERVAL = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,      // migration enabled (all islands initialised and running)
  input  indiv_t local_i,
  input  indiv_t imm_i,
  output indiv_t out_o,
  output indiv_t emig_o,
  output logic   mig_o
);
  localparam int CW = $clog2(INTERVAL + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || !en)                      cnt <= '0;
    else if (cnt == CW'(INTERVAL - 1))      cnt <= '0;
    else                                    cnt <= cnt + 1'b1;
  end

  assign mig_o  = en && (cnt == CW'(INTERVAL - 1)) && local_i.valid && !local_i.init && imm_i.valid;
  assign emig_o = local_i;

  always_comb begin
    out_o = local_i;
    if (mig_o) begin
      out_o.chrom = imm_i.chrom;
      out_o.fit   = imm_i.fit;
    end
  end

  initial assert (INTERVAL >= 1) else $error("INTERVAL must be at least 1");
endmodule
