// tb_moga_selection: self-checking test of normal and biased selection.
// Random offspring/parent fitness pairs from a small range (so ties and
// dominance both occur) go through a normal instance and a biased instance
// (objective 1); the selected flag is compared with an independently written
// dominance rule, one clock later, and the other fields must pass unchanged.
module tb_moga_selection;
  import moga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  off_t in;
  orm_t out_n, out_b;
  moga_selection #(.BIASED(1'b0))                dut_n (.clk, .rst_n, .in_i(in), .out_o(out_n));
  moga_selection #(.BIASED(1'b1), .BIAS_OBJ(1))  dut_b (.clk, .rst_n, .in_i(in), .out_o(out_b));

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
    off_t prev;
    int n_sel = 0, n_bsel = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      prev = in;
      in = '0;
      in.valid = 1'b1;
      in.init  = ($urandom_range(0, 19) == 0);
      in.chrom = {$urandom(), $urandom()};
      for (int k = 0; k < N_OBJ; k++) begin
        in.fit[k]     = FIT_W'($urandom_range(0, 3));
        in.par_fit[k] = FIT_W'($urandom_range(0, 3));
      end
      in.par_addr = addr_t'($urandom());
      @(posedge clk); #1;
      begin
        automatic bit en = in.init ? 1'b1 : ref_dom(in.fit, in.par_fit);
        automatic bit eb = in.init ? 1'b1 : (in.fit[1] > in.par_fit[1]);
        checks++;
        if (out_n.selected !== en || out_b.selected !== eb || out_n.ow_addr !== in.par_addr ||
            out_n.chrom !== in.chrom || out_n.fit !== in.fit || out_n.found || out_n.wr != WR_NONE ||
            out_n.init !== in.init) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d sel=%b/%b exp %b/%b", t, out_n.selected, out_b.selected, en, eb);
        end
        if (en && !in.init) n_sel++;
        if (eb && !en && !in.init) n_bsel++;
      end
    end
    checks++;
    if (n_sel == 0 || n_bsel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
