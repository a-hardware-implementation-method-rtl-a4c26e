// Reference model of one overlap rejection stage, shared by the overlap
// rejection testbenches. Applies the per-slot rule to record r for slot idx
// with state (fp, fr) and returns the updated record; fp/fr are updated.
function automatic moga_pkg::orm_t orm_ref_step(input moga_pkg::orm_t r, input int idx,
                                                inout moga_pkg::fitvec_t fp, inout bit fr);
  moga_pkg::orm_t o = r;
  bit same = (fp == r.fit);
  bit pdom = (fp[0] >= r.fit[0]) && (fp[1] >= r.fit[1]) && ((fp[0] > r.fit[0]) || (fp[1] > r.fit[1]));
  if (!r.valid) return o;
  if (r.init) begin
    if (int'(r.ow_addr) == idx) begin
      fp = r.fit; fr = 0; o.found = 1; o.wr = moga_pkg::WR_INIT; o.wr_addr = moga_pkg::addr_t'(idx);
    end
  end else if (r.found) begin
    if (same) fr = 1;
  end else if (r.selected && int'(r.ow_addr) == idx) begin
    fp = r.fit; o.found = 1; o.wr = moga_pkg::WR_PARENT; o.wr_addr = moga_pkg::addr_t'(idx);
  end else if (same) begin
    o.found = 1;
  end else if (fr && int'(r.ow_addr) != idx && !pdom) begin
    fp = r.fit; fr = 0; o.found = 1; o.wr = moga_pkg::WR_FREE; o.wr_addr = moga_pkg::addr_t'(idx);
  end
  return o;
endfunction
