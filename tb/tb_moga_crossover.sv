// tb_moga_crossover: self-checking test of pairing, HUX and parent choice.
// A stream of random individuals (with occasional gaps and initial-load
// records) is applied. The testbench keeps its own copy of the previous
// individual and checks for every offspring, one clock later:
//   * bits in which the parents agree are copied;
//   * either nothing was exchanged (no crossover) or, of the d differing bits,
//     exactly floor(d/2) or ceil(d/2) come from parent2, and every consecutive
//     pair of differing bits has exactly one exchanged;
//   * the forwarded parent is the dominated one, parent1 when neither dominates;
//   * initial-load records pass straight through and restart the pairing;
//   * the crossover rate over the run is 0.33..0.47 (expected 0.40).
module tb_moga_crossover;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  indiv_t in;
  off_t   out;
  logic   xo;
  moga_crossover dut (.clk, .rst_n, .in_i(in), .out_o(out), .xo_o(xo));

  function automatic bit ref_dom(fitvec_t a, fitvec_t b);
    return (a[0] >= b[0]) && (a[1] >= b[1]) && ((a[0] > b[0]) || (a[1] > b[1]));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    indiv_t p1;
    bit have_p1 = 0;
    int n_off = 0, n_xo = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in = '0;
      in.valid = ($urandom_range(0, 9) != 0);
      in.init  = in.valid && ($urandom_range(0, 49) == 0);
      in.addr  = addr_t'($urandom());
      in.chrom = {$urandom(), $urandom()};
      in.fit[0] = FIT_W'($urandom_range(0, 3));
      in.fit[1] = FIT_W'($urandom_range(0, 3));
      @(posedge clk); #1;
      if (!in.valid) begin
        checks++;
        if (out.valid) failures++;
      end else if (in.init) begin
        checks++;
        if (!out.valid || !out.init || out.chrom !== in.chrom || out.par_addr !== in.addr) failures++;
        have_p1 = 0;
      end else if (!have_p1) begin
        checks++;
        if (out.valid) failures++;
        p1 = in; have_p1 = 1;
      end else begin
        chrom_t d, s;
        int nd, ns, rank;
        automatic bit pairs_ok = 1;
        bit exp_p2;
        d  = p1.chrom ^ in.chrom;
        s  = out.chrom ^ p1.chrom;
        nd = $countones(d);
        ns = $countones(s);
        // exactly one member of each consecutive pair of differing bits exchanged
        if (ns != 0) begin
          automatic int cnt_in_pair = 0;
          rank = 0;
          for (int b = 0; b < N_BITS; b++) if (d[b]) begin
            cnt_in_pair += s[b];
            if (rank % 2 == 1) begin
              if (cnt_in_pair != 1) pairs_ok = 0;
              cnt_in_pair = 0;
            end
            rank++;
          end
        end
        exp_p2 = ref_dom(p1.fit, in.fit);   // parent2 dominated -> forward parent2
        checks++;
        if (!out.valid || out.init || (s & ~d) != '0 ||
            !(ns == 0 || ns == nd / 2 || ns == (nd + 1) / 2) || !pairs_ok ||
            (ns != 0 && !xo) ||
            out.par_addr !== (exp_p2 ? in.addr : p1.addr) || out.par_fit !== (exp_p2 ? in.fit : p1.fit)) begin
          failures++;
          if (failures < 10) $display("t=%0d nd=%0d ns=%0d pairs_ok=%0d addr %0d", t, nd, ns, pairs_ok, out.par_addr);
        end
        n_off++;
        if (xo) n_xo++;
        p1 = in;
      end
    end
    checks++;
    $display("crossover applied %0d of %0d", n_xo, n_off);
    if (n_xo * 100 < n_off * 33 || n_xo * 100 > n_off * 47) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
