// Helpers shared by the island and top-level testbenches: an independent
// knapsack evaluation and a dominance test.
function automatic moga_pkg::fitvec_t ref_eval(moga_pkg::chrom_t c);
  moga_pkg::fitvec_t f;
  bit ok = 1;
  for (int k = 0; k < moga_pkg::N_OBJ; k++) begin
    int unsigned p = 0, w = 0, cap = 0;
    for (int i = 0; i < moga_pkg::N_BITS; i++) begin
      cap += moga_pkg::item_weight(k, i);
      if (c[i]) begin p += moga_pkg::item_profit(k, i); w += moga_pkg::item_weight(k, i); end
    end
    if (w > cap / 2) ok = 0;
    f[k] = moga_pkg::FIT_W'(p);
  end
  return ok ? f : '0;
endfunction

function automatic bit ref_dom(moga_pkg::fitvec_t a, moga_pkg::fitvec_t b);
  return (a[0] >= b[0]) && (a[1] >= b[1]) && ((a[0] > b[0]) || (a[1] > b[1]));
endfunction
