// moga_pkg: types, sizes and helper functions shared by the multi-objective
// genetic algorithm (MOGA) pipeline.
//
// The sizes follow the benchmark the design was evaluated on, the two-knapsack,
// fifty-item problem 2KP50-50: a chromosome has one bit per item (50 bits) and
// every individual carries one fitness value per objective (2 objectives, one
// per knapsack). Each island holds 64 individuals. The fitness width (16 bits)
// and the item tables are this design's own choice: the published benchmark
// tables are not reproduced here, so profits and weights are generated by a
// fixed integer formula in the same range (10..100) as that benchmark family,
// and every knapsack capacity is half the sum of its item weights.
//
// The records passed between the pipeline modules are defined here:
//   indiv_t : one individual (management -> immigration -> crossover, and the
//             population write from overlap rejection back to management)
//   off_t   : offspring plus the parent chosen for replacement (crossover ->
//             mutation -> evaluation -> selection)
//   orm_t   : offspring travelling through the overlap rejection chain
package moga_pkg;

  localparam int N_BITS   = 50;  // chromosome length = number of knapsack items
  localparam int N_OBJ    = 2;   // objectives = knapsacks
  localparam int FIT_W    = 16;  // width of one fitness value
  localparam int POP_SIZE = 64;  // individuals per island
  localparam int ADDR_W   = 6;   // population address width (2**ADDR_W >= POP_SIZE)
  localparam int N_ISL    = N_OBJ + 1;  // one normal island + one biased island per objective

  typedef logic [N_BITS-1:0]             chrom_t;
  typedef logic [FIT_W-1:0]              fit_t;
  typedef logic [N_OBJ-1:0][FIT_W-1:0]   fitvec_t;
  typedef logic [ADDR_W-1:0]             addr_t;

  // How the overlap rejection chain disposed of an offspring.
  typedef enum logic [1:0] {
    WR_NONE    = 2'd0,  // not written
    WR_PARENT  = 2'd1,  // policy 1: replaced the selected parent
    WR_FREE    = 2'd2,  // policy 3: replaced an individual marked as duplicate
    WR_INIT    = 2'd3   // initial population load
  } wr_kind_e;

  typedef struct packed {
    logic    valid;
    logic    init;     // record belongs to the initial population load
    addr_t   addr;
    chrom_t  chrom;
    fitvec_t fit;
  } indiv_t;

  typedef struct packed {
    logic    valid;
    logic    init;
    chrom_t  chrom;     // offspring chromosome
    fitvec_t fit;       // offspring fitness (valid after evaluation)
    addr_t   par_addr;  // parent chosen for replacement
    fitvec_t par_fit;
  } off_t;

  typedef struct packed {
    logic     valid;
    logic     init;
    chrom_t   chrom;     // offspring chromosome
    fitvec_t  fit;       // offspring fitness
    logic     selected;  // offspring should replace the parent
    addr_t    ow_addr;   // address of that parent
    logic     found;     // offspring placed, or an identical individual seen
    wr_kind_e wr;        // whether and why the offspring was written
    addr_t    wr_addr;   // where it was written
  } orm_t;

  // x dominates y: no objective worse, at least one better (maximisation).
  function automatic logic dominates(fitvec_t x, fitvec_t y);
    logic ge_all = 1'b1;
    logic gt_any = 1'b0;
    for (int i = 0; i < N_OBJ; i++) begin
      if (x[i] < y[i]) ge_all = 1'b0;
      if (x[i] > y[i]) gt_any = 1'b1;
    end
    return ge_all && gt_any;
  endfunction

  // Item tables of the knapsack problem: value in 10..100 from an integer hash
  // of (knapsack k, item i, table t); t = 0 profit, t = 1 weight.
  function automatic int unsigned item_value(int k, int i, int t);
    int unsigned h;
    h = 32'h9E37_79B9 * (i + 1) + 32'h85EB_CA6B * (k + 1) + 32'hC2B2_AE35 * (t + 1);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return 10 + (h % 91);
  endfunction

  function automatic int unsigned item_profit(int k, int i);
    return item_value(k, i, 0);
  endfunction

  function automatic int unsigned item_weight(int k, int i);
    return item_value(k, i, 1);
  endfunction

  function automatic int unsigned capacity(int k);
    int unsigned s = 0;
    for (int i = 0; i < N_BITS; i++) s += item_weight(k, i);
    return s / 2;
  endfunction

endpackage
