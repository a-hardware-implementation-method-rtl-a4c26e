// tb_moga_management: self-checking test of the population memory and its
// read/write/forward behaviour (64 individuals, the default).
// 1. After reset with run high, 64 initial records with addresses 0..63 must
//    leave on consecutive clocks; the testbench writes each back (init = 1)
//    with a made-up fitness, in a shuffled order, and init_done must rise after
//    the last one.
// 2. Running: every clock must carry an individual. A read must equal the
//    testbench's copy of the memory at that address; in a clock after a write,
//    the written individual must be forwarded (bypass) instead. Writes come at
//    random clocks and addresses. Every address must be read at least once.
// 3. With run low, host reads of all 64 addresses must return the copy.
module tb_moga_management;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  indiv_t wr, out, hq;
  logic init_done, bypass, host_rd;
  addr_t host_addr;
  moga_management dut (.clk, .rst_n, .run, .wr_i(wr), .out_o(out), .init_done_o(init_done),
                       .bypass_o(bypass), .host_rd_i(host_rd), .host_addr_i(host_addr), .host_q_o(hq));

  chrom_t  mc [POP_SIZE];
  fitvec_t mf [POP_SIZE];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [POP_SIZE];
    bit seen [POP_SIZE];
    int n_bypass = 0, n_read = 0, n_seen = 0;
    indiv_t last_wr;
    bit wrote_last;
    wr = '0; host_rd = 0; host_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1; run = 1;
    // 1. initial records
    for (int i = 0; i < POP_SIZE; i++) begin
      @(posedge clk); #1;
      checks++;
      if (!out.valid || !out.init || out.addr !== addr_t'(i)) begin
        failures++;
        if (failures < 10) $display("init record %0d: valid %b init %b addr %0d", i, out.valid, out.init, out.addr);
      end
      mc[i] = out.chrom;
      mf[i] = {16'(i * 3), 16'(i * 5)};
    end
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int i = 0; i < POP_SIZE; i++) begin
      @(negedge clk);
      wr = '{valid: 1'b1, init: 1'b1, addr: addr_t'(order[i]), chrom: mc[order[i]], fit: mf[order[i]]};
      checks++;
      if (init_done) failures++;
    end
    @(negedge clk);
    wr = '0;
    @(negedge clk);
    checks++;
    if (!init_done) failures++;
    // 2. running
    wrote_last = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk); #1;
      checks++;
      if (wrote_last) begin
        if (!out.valid || !bypass || out.addr !== last_wr.addr || out.chrom !== last_wr.chrom ||
            out.fit !== last_wr.fit || out.init) failures++;
        n_bypass++;
      end else if (t > 0) begin
        if (!out.valid || bypass || out.chrom !== mc[out.addr] || out.fit !== mf[out.addr]) begin
          failures++;
          if (failures < 10) $display("read mismatch addr %0d", out.addr);
        end
        if (!seen[out.addr]) begin seen[out.addr] = 1; n_seen++; end
        n_read++;
      end
      @(negedge clk);
      wrote_last = 0;
      wr = '0;
      if ($urandom_range(0, 3) == 0) begin
        wr = '{valid: 1'b1, init: 1'b0, addr: addr_t'($urandom_range(0, POP_SIZE - 1)),
               chrom: {$urandom(), $urandom()}, fit: {$urandom()}};
        mc[wr.addr] = wr.chrom;
        mf[wr.addr] = wr.fit;
        last_wr = wr;
        wrote_last = 1;
      end
    end
    // 3. host reads
    @(negedge clk);
    wr = '0; run = 0;
    repeat (2) @(negedge clk);
    for (int a = 0; a < POP_SIZE; a++) begin
      host_rd = 1; host_addr = addr_t'(a);
      @(posedge clk); #1;
      checks++;
      if (!hq.valid || hq.addr !== addr_t'(a) || hq.chrom !== mc[a] || hq.fit !== mf[a] || out.valid) failures++;
      @(negedge clk);
    end
    checks++;
    $display("reads %0d bypass %0d distinct addresses %0d", n_read, n_bypass, n_seen);
    if (n_seen != POP_SIZE || n_bypass < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
