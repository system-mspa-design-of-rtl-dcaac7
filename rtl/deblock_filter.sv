// deblock_filter: one position of the H.263+ deblocking filter
// (combinational). A, B | C, D are the four pixels across a block edge.
//   d  = (A - 4B + 4C - D) / 8
//   d1 = UpDownRamp(d, STRENGTH(QP))
//   B' = clip(B + d1),  C' = clip(C - d1)
//   d2 = clipd1((A - D) / 4, d1 / 2)
//   A' = A - d2,  D' = D + d2
// UpDownRamp(x, s) = sign(x) * max(0, |x| - max(0, 2(|x| - s))); '/' is
// integer division with truncation toward zero (ITU-T H.263 Annex J).
module deblock_filter
  import h263_pkg::*;
(
  input  pix_t       a, b, c, d,
  input  logic [4:0] qp,
  output pix_t       a_o, b_o, c_o, d_o
);
  function automatic int tdiv(input int x, input int y);
    return (x < 0) ? -((-x) / y) : x / y;
  endfunction

  always_comb begin
    int dd, ad, s, r, d1, d2, lim;
    s  = int'(db_strength(qp));
    dd = tdiv(int'(a) - 4 * int'(b) + 4 * int'(c) - int'(d), 8);
    ad = (dd < 0) ? -dd : dd;
    r  = ad - ((2 * (ad - s) > 0) ? 2 * (ad - s) : 0);
    if (r < 0) r = 0;
    d1 = (dd < 0) ? -r : r;
    lim = tdiv(d1, 2);
    if (lim < 0) lim = -lim;
    d2 = tdiv(int'(a) - int'(d), 4);
    if (d2 > lim) d2 = lim;
    if (d2 < -lim) d2 = -lim;
    b_o = clip_pix(16'(int'(b) + d1));
    c_o = clip_pix(16'(int'(c) - d1));
    a_o = clip_pix(16'(int'(a) - d2));
    d_o = clip_pix(16'(int'(d) + d2));
  end
endmodule
