// mc_block: motion-compensated 8x8 prediction from a 9x9 reference window.
//
// Helper of pred_err and precon. The 81 reference pixels (9 lines of 9,
// taken at the integer part of the vector) are written with 'ref_we'
// in raster order. 'pred(r,c)' is then available combinationally for any
// position, interpolated with the half pel flags hx, hy (h263_pkg::hp_pred).
module mc_block
  import h263_pkg::*;
(
  input  logic       clk,
  input  logic       ref_we,
  input  logic [6:0] ref_idx,     // 0..80, raster in the 9x9 window
  input  pix_t       ref_pix,
  input  logic       hx,
  input  logic       hy,
  input  logic [2:0] r,
  input  logic [2:0] c,
  output pix_t       pred
);
  pix_t win [81];
  always_ff @(posedge clk) if (ref_we) win[ref_idx] <= ref_pix;

  logic [6:0] i;
  always_comb begin
    i = 7'(r) * 7'd9 + 7'(c);
    pred = hp_pred(win[i], win[i + 7'd1], win[i + 7'd9], win[i + 7'd10], hx, hy);
  end
endmodule
