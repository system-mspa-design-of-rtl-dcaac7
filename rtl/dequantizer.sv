// dequantizer: H.263 inverse quantization of one level (combinational).
//   L = 0:    0
//   QP odd:   |C| = QP (2|L| + 1)
//   QP even:  |C| = QP (2|L| + 1) - 1
//   sign of L, limited to -2048..2047; INTRA DC: C = 8 L.
module dequantizer (
  input  logic signed [8:0]  level,
  input  logic [4:0]         qp,
  input  logic               intra,
  input  logic               is_dc,
  output logic signed [15:0] coef
);
  logic [7:0]         a;
  logic [15:0]        m;
  logic signed [16:0] v;
  always_comb begin
    a = level[8] ? 8'(-level) : 8'(level);
    m = 16'(qp) * (16'(a) * 16'd2 + 16'd1) - (qp[0] ? 16'd0 : 16'd1);
    v = level[8] ? -17'(m) : 17'(m);
    if (v > 17'sd2047)  v = 17'sd2047;
    if (v < -17'sd2048) v = -17'sd2048;
    if (intra && is_dc)      coef = 16'(level) * 16'sd8;
    else if (level == 9'sd0) coef = '0;
    else                     coef = 16'(v);
  end
endmodule
