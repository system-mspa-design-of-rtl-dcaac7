// halfpel_interp: half pixel interpolator built from two adders.
//
// A block is fed row by row, one horizontal pixel pair (a = p[x], b = p[x+1])
// per valid cycle. The first adder forms the horizontal sum
// h = a + (hx ? b : a), i.e. twice the horizontal half-pel value. A W-entry
// shift register keeps the h values of the previous row; the second adder
// forms h_prev + h (hy) or h + h (no hy) together with the rounding constant
// 2, and the result divided by 4 is the interpolated pixel:
//   (a), (a+b+1)/2, (a+c+1)/2 or (a+b+c+d+2)/4, the H.263 bilinear rules.
// With hy set, the first row only primes the line register and outputs start
// with the second row (so W x (H+1) pairs give W x H pixels). The output is
// combinational from the current inputs; the line register advances on valid.
module halfpel_interp #(
  parameter int unsigned W = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic       first_row,   // pair belongs to the first input row
  input  logic       hx,
  input  logic       hy,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic       out_valid,
  output logic [7:0] out_pix
);
  logic [8:0]  h;
  logic [8:0]  line [W];
  logic [10:0] s;

  always_comb begin
    h = {1'b0, a} + {1'b0, (hx ? b : a)};                           // adder 1
    s = {2'b0, h} + {2'b0, (hy ? line[W-1] : h)} + 11'd2;           // adder 2
    out_pix   = s[9:2];
    out_valid = valid && !(hy && first_row);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) line[i] <= '0;
    end else if (valid) begin
      line[0] <= h;
      for (int i = 1; i < W; i++) line[i] <= line[i-1];
    end
  end
endmodule
