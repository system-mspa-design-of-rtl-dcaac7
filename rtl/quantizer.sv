// quantizer: H.263 quantization of one DCT coefficient per cycle
// (combinational).
//   INTER:    |L| = (|C| - QP/2) / (2 QP)
//   INTRA AC: |L| = |C| / (2 QP)
//   INTRA DC: L = round(C / 8), limited to 1..254
// AC levels are limited to -127..127. The division by 2QP is a multiply by
// a 17-bit reciprocal, R = floor(2^16 / 2QP) + 1, followed by one
// correction step, which is exact for |C| < 4096.
module quantizer (
  input  logic signed [15:0] coef,
  input  logic [4:0]         qp,
  input  logic               intra,
  input  logic               is_dc,
  output logic signed [8:0]  level
);
  function automatic logic [16:0] recip(input int q);
    return (q == 0) ? 17'd0 : 17'((65536 / (2 * q)) + 1);
  endfunction

  logic [16:0] rtab [32];
  for (genvar q = 0; q < 32; q++) begin : g_r
    assign rtab[q] = recip(q);
  end

  logic [15:0] a, num;
  logic [32:0] prod;
  logic [15:0] q0, q1;
  logic [5:0]  d;
  logic [11:0] dc;
  always_comb begin
    a    = coef[15] ? 16'(-coef) : 16'(coef);
    d    = {qp, 1'b0};
    num  = intra ? a : ((a > 16'(qp >> 1)) ? a - 16'(qp >> 1) : 16'd0);
    prod = 33'(num) * 33'(rtab[qp]);
    q0   = prod[31:16];
    q1   = (32'(q0) * 32'(d) > 32'(num)) ? q0 - 16'd1 : q0;
    if (q1 > 16'd127) q1 = 16'd127;
    dc = 12'((coef + 16'sd4) >>> 3);
    if (intra && is_dc) begin
      if (coef < 16'sd4)        level = 9'sd1;
      else if (dc > 12'd254)    level = 9'sd254;
      else                      level = 9'(dc);
    end else begin
      level = coef[15] ? -9'(q1) : 9'(q1);
    end
  end
endmodule
