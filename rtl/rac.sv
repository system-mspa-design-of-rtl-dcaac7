// rac: ROM accumulator of the distributed-arithmetic DCT/IDCT.
//
// Two 16-word ROMs (one for the forward DCT, one for the inverse) are
// addressed by four bits, one bit of each of four input words. Word 'a' of a
// ROM is the sum of the four coefficients whose address bit is set. The
// accumulator adds the ROM word shifted to the weight of the bit being
// processed (LSB first) and subtracts it on the sign bit, so after 16 bit
// cycles it holds the inner product of the coefficient vector with the
// four 16-bit two's complement inputs, scaled by 2^13.
// RAC position K = 0..3 serves forward output u = 2K and the inverse even
// part e_K; K = 4..7 serves forward output u = 2(K-4)+1 and the inverse odd
// part o_K-4. Forward ROM: (c_u/2)cos((2n+1)u pi/16), n = 0..3; inverse ROM:
// the coefficients of X_2m (even part) or X_2m+1 (odd part) for output K.
// Timing: 'clr' with the bit-0 cycle restarts; the result is valid the cycle
// after the bit-15 cycle.
module rac #(
  parameter int unsigned K = 0          // RAC index 0..7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clr,        // first bit cycle
  input  logic [3:0]         bitidx,     // weight of the current bit
  input  logic               idct,       // 1: inverse ROM
  input  logic [3:0]         addr,
  output logic signed [31:0] acc
);
  import h263_pkg::*;

  function automatic int rom_word(input bit inv, input int a);
    int s = 0;
    for (int n = 0; n < 4; n++)
      if (((a >> n) & 1) != 0) begin
        if (!inv)         s += dct_coef((K < 4) ? 2 * K : 2 * (K - 4) + 1, n);
        else if (K < 4)   s += dct_coef(2 * n, K);
        else              s += dct_coef(2 * n + 1, K - 4);
      end
    return s;
  endfunction

  logic signed [15:0] rom_f [16];
  logic signed [15:0] rom_i [16];
  for (genvar a = 0; a < 16; a++) begin : g_rom
    assign rom_f[a] = 16'(rom_word(1'b0, a));
    assign rom_i[a] = 16'(rom_word(1'b1, a));
  end

  logic signed [31:0] term;
  always_comb begin
    term = 32'(idct ? rom_i[addr] : rom_f[addr]) <<< bitidx;
    if (bitidx == 4'd15) term = -term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (en) acc <= clr ? term : acc + term;
  end
endmodule
