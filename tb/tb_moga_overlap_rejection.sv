// tb_moga_overlap_rejection: self-checking test of the overlap rejection chain.
// An 8-slot chain is first loaded with 8 initial records, then fed a random
// offspring every clock (fitness from a tiny range, random selected flag and
// parent address). Because each offspring passes every slot after its
// predecessor, the reference processes offspring one at a time over all slots.
// Each population write leaving the chain (valid, address, chromosome, fitness,
// kind) and the final stored fitness and free flags are compared; the latency
// must be exactly 8 clocks. Policies 1, 2 and 3 must all occur.
module tb_moga_overlap_rejection;
  import moga_pkg::*;
  `include "tb/moga_orm_ref.svh"
  localparam int P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  orm_t in;
  indiv_t wr;
  wr_kind_e kind;
  logic dup;
  fitvec_t fp [P];
  logic fr [P];
  moga_overlap_rejection #(.POP(P)) dut (.clk, .rst_n, .in_i(in), .wr_o(wr), .wr_kind_o(kind),
                                         .dup_rej_o(dup), .fit_p_o(fp), .free_o(fr));

  fitvec_t mfp [P];
  bit      mfr [P];
  orm_t    expq [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare the record leaving the chain with the expected one
  int n_kind [4] = '{0, 0, 0, 0};
  int n_dup = 0;
  always @(posedge clk) #2 if (rst_n && expq.size() > 0) begin
    automatic orm_t e = expq.pop_front();
    checks++;
    if (e.valid) begin
      automatic bit ew = (e.wr != WR_NONE);
      if (wr.valid !== ew || kind !== e.wr ||
          (ew && (wr.addr !== e.wr_addr || wr.chrom !== e.chrom || wr.fit !== e.fit)) ||
          dup !== (!e.init && e.found && !ew)) begin
        failures++;
        if (failures < 10) $display("write mismatch: got %b kind %0d addr %0d, exp kind %0d addr %0d", wr.valid, kind, wr.addr, e.wr, e.wr_addr);
      end
      n_kind[e.wr]++;
      if (!e.init && e.found && !ew) n_dup++;
    end else if (wr.valid) failures++;
  end

  initial begin
    in = '0;
    foreach (mfp[i]) begin mfp[i] = '0; mfr[i] = 0; end
    // P-clock latency: pre-fill the expectation queue with P-1 bubbles
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < P - 1; i++) expq.push_back('0);
    for (int t = 0; t < 4000 + P; t++) begin
      orm_t r;
      r = '0;
      if (t < P) begin
        r.valid = 1; r.init = 1; r.selected = 1; r.ow_addr = addr_t'(t);
        r.fit[0] = FIT_W'($urandom_range(0, 3)); r.fit[1] = FIT_W'($urandom_range(0, 3));
        r.chrom = {$urandom(), $urandom()};
      end else if (t < 4000) begin
        r.valid = ($urandom_range(0, 7) != 0);
        r.fit[0] = FIT_W'($urandom_range(0, 3)); r.fit[1] = FIT_W'($urandom_range(0, 3));
        r.chrom = {$urandom(), $urandom()};
        r.selected = $urandom_range(0, 1);
        r.ow_addr  = addr_t'($urandom_range(0, P - 1));
      end
      in = r;
      for (int i = 0; i < P; i++) begin
        automatic fitvec_t f = mfp[i];
        automatic bit b = mfr[i];
        r = orm_ref_step(r, i, f, b);
        mfp[i] = f; mfr[i] = b;
      end
      expq.push_back(r);
      @(negedge clk);
    end
    in = '0;
    repeat (P + 2) @(negedge clk);
    for (int i = 0; i < P; i++) begin
      checks++;
      if (fp[i] !== mfp[i] || fr[i] !== mfr[i]) failures++;
    end
    checks++;
    if (n_kind[WR_PARENT] == 0 || n_kind[WR_FREE] == 0 || n_kind[WR_INIT] != P || n_dup == 0) failures++;
    $display("parent %0d free %0d init %0d dup %0d", n_kind[1], n_kind[2], n_kind[3], n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
