// moga_management: population memory of one island and the head of its pipeline.
//
// The population (chromosome and fitness values of POP_SIZE individuals) sits in
// a single-port memory: one read or one write per clock. Every clock the module
// sends one individual to the crossover side (out_o):
//   * when the overlap rejection chain asks for a population write (wr_i.valid),
//     the memory port writes it and the same offspring, with its address and
//     fitness, is sent out in that clock, so the pipeline never stalls;
//   * otherwise a uniformly random address is read and that individual is sent.
// After reset the module first issues POP_SIZE initial records (init = 1, random
// chromosome, addresses 0..POP_SIZE-1). They run through the pipeline to be
// evaluated and come back as forced writes; once all POP_SIZE have been written
// init_done_o rises and, while run is high, the random reads start. Loading the
// initial population this way, the run/host interface and the random source are
// this design's own choices.
//
// Host access: while run is low and no write is pending, host_rd_i reads
// host_addr_i; host_q_o holds the individual one clock later.
// Timing: out_o is registered, one clock after the write or read it reflects.
module moga_management
  import moga_pkg::*;
#(
  parameter int          POP       = POP_SIZE,
  parameter logic [31:0] SEED      = 32'h2545_F491
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,          // issue individuals to the pipeline
  input  indiv_t wr_i,         // population write from overlap rejection
  output indiv_t out_o,        // individual to immigration/crossover
  output logic   init_done_o,  // initial population fully written
  output logic   bypass_o,     // this clock's out_o is a forwarded write
  input  logic   host_rd_i,
  input  addr_t  host_addr_i,
  output indiv_t host_q_o
);
  typedef struct packed {
    chrom_t  chrom;
    fitvec_t fit;
  } word_t;

  word_t mem [POP];

  typedef enum logic [1:0] {S_LOAD, S_WAIT, S_RUN} state_e;
  state_e state;
  logic [ADDR_W:0] load_cnt;   // initial records issued
  logic [ADDR_W:0] wr_cnt;     // initial records written back

  logic [63:0] rnd;
  moga_rng #(.W(64), .SEED(SEED)) u_rng (.clk(clk), .rst_n(rst_n), .en(1'b1), .rnd_o(rnd));

  // Random address: scale a 16-bit random number onto 0..POP-1.
  addr_t rd_addr;
  logic [31:0] scaled;
  assign scaled  = {16'd0, rnd[15:0]} * POP;
  assign rd_addr = addr_t'(scaled[31:16]);

  // Memory port: a write always wins; otherwise the pipeline or the host reads.
  logic   do_read, host_read;
  addr_t  mem_addr;
  word_t  mem_q;
  assign do_read   = (state == S_RUN) && run && !wr_i.valid;
  assign host_read = !run && !wr_i.valid && host_rd_i;
  assign mem_addr  = wr_i.valid ? wr_i.addr : (host_read ? host_addr_i : rd_addr);

  always_ff @(posedge clk) begin
    if (wr_i.valid) mem[mem_addr] <= '{chrom: wr_i.chrom, fit: wr_i.fit};
    else            mem_q         <= mem[mem_addr];
  end

  logic   rd_pending, host_pending;
  addr_t  rd_addr_q, host_addr_q;
  indiv_t fwd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      load_cnt     <= '0;
      wr_cnt       <= '0;
      fwd          <= '0;
      rd_pending   <= 1'b0;
      host_pending <= 1'b0;
      host_addr_q  <= '0;
      rd_addr_q    <= '0;
      bypass_o     <= 1'b0;
    end else begin
      fwd          <= '0;
      rd_pending   <= 1'b0;
      host_pending <= host_read;
      host_addr_q  <= host_addr_i;
      bypass_o     <= 1'b0;
      if (wr_i.valid && wr_i.init) wr_cnt <= wr_cnt + 1'b1;
      unique case (state)
        S_LOAD: begin
          fwd <= '{valid: 1'b1, init: 1'b1, addr: addr_t'(load_cnt),
                   chrom: chrom_t'(rnd[63:64-N_BITS]), fit: '0};
          load_cnt <= load_cnt + 1'b1;
          if (load_cnt == (ADDR_W+1)'(POP - 1)) state <= S_WAIT;
        end
        S_WAIT: begin
          if (wr_cnt == (ADDR_W+1)'(POP)) state <= S_RUN;
        end
        S_RUN: begin
          if (run && wr_i.valid) begin
            fwd      <= wr_i;
            fwd.init <= 1'b0;
            bypass_o <= 1'b1;
          end
          rd_pending <= do_read;
          rd_addr_q  <= rd_addr;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_comb begin
    out_o = fwd;
    if (rd_pending) out_o = '{valid: 1'b1, init: 1'b0, addr: rd_addr_q,
                              chrom: mem_q.chrom, fit: mem_q.fit};
  end

  assign init_done_o = (state == S_RUN);

  always_comb begin
    host_q_o = '{valid: host_pending, init: 1'b0, addr: host_addr_q, chrom: mem_q.chrom, fit: mem_q.fit};
  end

  initial assert (POP <= 2**ADDR_W && POP >= 2) else $error("POP out of range");

  // A population write must target an existing slot, and the initial load
  // must not produce more writes than there are slots.
  a_wr_addr: assert property (@(posedge clk) disable iff (!rst_n)
    wr_i.valid |-> (int'(wr_i.addr) < POP));
  a_init_cnt: assert property (@(posedge clk) disable iff (!rst_n)
    int'(wr_cnt) <= POP);
endmodule
