// moga_island: one MOGA pipeline (the basic architecture), one island of the
// parallel architecture.
//
// Stages, one record per clock through each:
//   management -> immigration -> crossover -> mutation -> evaluation
//   -> selection -> overlap rejection (POP stages) -> back to management
// Management sends one individual per clock; crossover pairs it with the
// previous one and emits one offspring per clock; the offspring is mutated,
// evaluated on all objectives and judged against the chosen parent (normal
// selection, or biased selection on objective BIAS_OBJ); the overlap rejection
// chain then decides where, if anywhere, it enters the population and sends the
// write back to management, which forwards the written offspring to crossover
// in the same clock instead of reading the memory.
//
// eval_cnt_o counts offspring evaluations (one per clock once running).
// Latency of the loop: about POP + 5 clocks. The pipeline never stalls.
module moga_island
  import moga_pkg::*;
#(
  parameter int          POP          = POP_SIZE,
  parameter bit          BIASED       = 1'b0,
  parameter int          BIAS_OBJ     = 0,
  parameter int          MIG_INTERVAL = 256,
  parameter int          XO_RATE      = 102,
  parameter int          MUT_RATE     = 10,
  parameter logic [31:0] SEED         = 32'h5107_A3C1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,
  input  logic     mig_en,        // migration enabled (all islands initialised)
  input  indiv_t   imm_i,         // immigrant from another island
  output indiv_t   emig_o,        // individual offered to other islands
  output logic     init_done_o,
  output logic     mig_o,         // an immigrant entered crossover this clock
  output logic     bypass_o,      // management forwarded a write this clock
  output logic     xo_o,          // crossover applied
  output logic     mut_o,         // mutation flipped a bit
  output wr_kind_e wr_kind_o,     // population write kind leaving overlap rejection
  output logic     dup_rej_o,     // offspring dropped as duplicate
  output logic [31:0] eval_cnt_o,
  input  logic     host_rd_i,
  input  addr_t    host_addr_i,
  output indiv_t   host_q_o
);
  indiv_t mg_out, xo_in, wr;
  off_t   xo_out, mu_out, ev_out;
  orm_t   sel_out;
  fitvec_t orm_fit [POP];
  logic    orm_free [POP];

  moga_management #(.POP(POP), .SEED(SEED ^ 32'h0000_0001)) u_mgmt (
    .clk(clk), .rst_n(rst_n), .run(run), .wr_i(wr), .out_o(mg_out),
    .init_done_o(init_done_o), .bypass_o(bypass_o),
    .host_rd_i(host_rd_i), .host_addr_i(host_addr_i), .host_q_o(host_q_o)
  );

  moga_immigration #(.INTERVAL(MIG_INTERVAL)) u_imm (
    .clk(clk), .rst_n(rst_n), .en(mig_en), .local_i(mg_out), .imm_i(imm_i),
    .out_o(xo_in), .emig_o(emig_o), .mig_o(mig_o)
  );

  moga_crossover #(.XO_RATE(XO_RATE), .SEED(SEED ^ 32'h0000_0100)) u_xo (
    .clk(clk), .rst_n(rst_n), .in_i(xo_in), .out_o(xo_out), .xo_o(xo_o)
  );

  moga_mutation #(.MUT_RATE(MUT_RATE), .SEED(SEED ^ 32'h0001_0000)) u_mut (
    .clk(clk), .rst_n(rst_n), .in_i(xo_out), .out_o(mu_out), .mut_o(mut_o)
  );

  moga_evaluation u_eval (.clk(clk), .rst_n(rst_n), .in_i(mu_out), .out_o(ev_out));

  moga_selection #(.BIASED(BIASED), .BIAS_OBJ(BIAS_OBJ)) u_sel (
    .clk(clk), .rst_n(rst_n), .in_i(ev_out), .out_o(sel_out)
  );

  moga_overlap_rejection #(.POP(POP)) u_orm (
    .clk(clk), .rst_n(rst_n), .in_i(sel_out), .wr_o(wr), .wr_kind_o(wr_kind_o),
    .dup_rej_o(dup_rej_o), .fit_p_o(orm_fit), .free_o(orm_free)
  );

  // Once running, the pipeline never stalls: an individual leaves
  // management every clock.
  a_no_stall: assert property (@(posedge clk) disable iff (!rst_n)
    (init_done_o && run && $past(init_done_o && run)) |-> mg_out.valid);

  always_ff @(posedge clk) begin
    if (!rst_n) eval_cnt_o <= '0;
    else if (ev_out.valid && !ev_out.init) eval_cnt_o <= eval_cnt_o + 1'b1;
  end
endmodule
