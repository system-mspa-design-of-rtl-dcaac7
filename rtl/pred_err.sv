// pred_err: prediction error ("Err") module, one macroblock per run.
//
// Inputs: the motion word of the macroblock (h263_pkg::mvword_t), then for
// each of the six blocks (Y0..Y3, Cb, Cr): 81 words of the 9x9 reference
// window (pixel in bits 7:0, window placed by the AGU at the integer part of
// the luminance or chrominance vector) followed by the 32 words of the
// current block (two pixels per word, left pixel in bits 15:8).
// Outputs per block: 64 signed error words, raster order, offered as soon as
// the block's input is complete (2 cycles later). The half pel flags are the
// low bits of the vector, for Cb/Cr after h263_pkg::chroma_mv. For an INTRA
// macroblock the prediction is zero and the outputs are the pixels.
module pred_err
  import h263_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  in_we,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_re,
  output word_t out_data,
  output logic  busy,
  output logic  done
);
  typedef enum logic [2:0] {S_IDLE, S_MV, S_REF, S_CUR, S_OUT} state_e;
  state_e  state;
  mvword_t mv;
  logic [2:0] blk;
  logic [6:0] cnt;
  logic [5:0] optr;
  pix_t cur [64];
  logic hx, hy;
  pix_t pred;

  always_comb begin
    if (blk < 3'd4) begin hx = mv.mvx[0]; hy = mv.mvy[0]; end
    else begin hx = chroma_mv(mv.mvx)[0]; hy = chroma_mv(mv.mvy)[0]; end
  end

  mc_block u_mc (.clk, .ref_we(state == S_REF && in_we), .ref_idx(cnt),
                 .ref_pix(in_data[7:0]), .hx, .hy, .r(optr[5:3]), .c(optr[2:0]),
                 .pred);

  always_ff @(posedge clk)
    if (state == S_CUR && in_we) begin
      cur[{cnt[4:0], 1'b0}] <= in_data[15:8];
      cur[{cnt[4:0], 1'b1}] <= in_data[7:0];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; mv <= '0; blk <= '0; cnt <= '0; optr <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_MV; blk <= '0;
      end else unique case (state)
        S_MV: if (in_we) begin mv <= mvword_t'(in_data); state <= S_REF; cnt <= '0; end
        S_REF: if (in_we) begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd80) begin state <= S_CUR; cnt <= '0; end
        end
        S_CUR: if (in_we) begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd31) begin state <= S_OUT; optr <= '0; end
        end
        S_OUT: if (out_re) begin
          optr <= optr + 6'd1;
          if (optr == 6'd63) begin
            cnt <= '0;
            blk <= blk + 3'd1;
            if (blk == 3'd5) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_REF;
          end
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = word_t'(16'(signed'({1'b0, cur[optr]})) -
                             (mv.intra ? 16'sd0 : 16'(signed'({1'b0, pred}))));
  assign busy      = (state != S_IDLE);
  logic unused;
  assign unused = ^{in_data[15:8] & 8'(state == S_REF), mv.rsv};
endmodule
