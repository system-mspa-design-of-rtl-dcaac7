// precon: P frame reconstruction, one macroblock per run.
//
// Inputs: the motion word, then for each of the six blocks the 81 words of
// the 9x9 reference window (pixel in bits 7:0) and the 64 signed
// prediction-error words from IQ-IDCT (raster order). As each error line
// (8 words) arrives it is added to the half pel prediction and clipped to
// 0..255, and the reconstructed line is offered as 4 words (two pixels per
// word, left pixel in bits 15:8), so the AGU can write it back line by line.
// INTRA macroblocks use a zero prediction.
module precon
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
  typedef enum logic [2:0] {S_IDLE, S_MV, S_REF, S_ERR, S_OUT} state_e;
  state_e  state;
  mvword_t mv;
  logic [2:0] blk;
  logic [6:0] cnt;
  logic [2:0] line;
  logic [1:0] optr;
  logic signed [15:0] err [8];
  logic hx, hy;
  pix_t pa, pb;

  always_comb begin
    if (blk < 3'd4) begin hx = mv.mvx[0]; hy = mv.mvy[0]; end
    else begin hx = chroma_mv(mv.mvx)[0]; hy = chroma_mv(mv.mvy)[0]; end
  end

  // two prediction lookups per output word
  pix_t p0, p1;
  mc_block u_mc0 (.clk, .ref_we(state == S_REF && in_we), .ref_idx(cnt),
                  .ref_pix(in_data[7:0]), .hx, .hy, .r(line),
                  .c({optr, 1'b0}), .pred(p0));
  mc_block u_mc1 (.clk, .ref_we(state == S_REF && in_we), .ref_idx(cnt),
                  .ref_pix(in_data[7:0]), .hx, .hy, .r(line),
                  .c({optr, 1'b1}), .pred(p1));

  always_comb begin
    pa = clip_pix((mv.intra ? 16'sd0 : 16'(p0)) + err[{optr, 1'b0}]);
    pb = clip_pix((mv.intra ? 16'sd0 : 16'(p1)) + err[{optr, 1'b1}]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; mv <= '0; blk <= '0; cnt <= '0; line <= '0; optr <= '0;
      done <= 1'b0;
      for (int i = 0; i < 8; i++) err[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_MV; blk <= '0;
      end else unique case (state)
        S_MV: if (in_we) begin mv <= mvword_t'(in_data); state <= S_REF; cnt <= '0; end
        S_REF: if (in_we) begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd80) begin state <= S_ERR; cnt <= '0; line <= '0; end
        end
        S_ERR: if (in_we) begin
          err[cnt[2:0]] <= signed'(in_data);
          cnt <= cnt + 7'd1;
          if (cnt[2:0] == 3'd7) begin state <= S_OUT; optr <= '0; end
        end
        S_OUT: if (out_re) begin
          optr <= optr + 2'd1;
          if (optr == 2'd3) begin
            line <= line + 3'd1;
            if (line != 3'd7) state <= S_ERR;
            else begin
              cnt <= '0;
              blk <= blk + 3'd1;
              if (blk == 3'd5) begin state <= S_IDLE; done <= 1'b1; end
              else state <= S_REF;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = {pa, pb};
  assign busy      = (state != S_IDLE);
  logic unused;
  assign unused = mv.rsv;
endmodule
