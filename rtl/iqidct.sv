// iqidct: IQ-IDCT module. One 8x8 block per run.
//
// Inputs: the motion word (bit 15: intra), a QP word (bits 4:0) and the 64
// quantized levels
// in zigzag order; each level is inverse-quantized as it arrives and stored
// at its raster position. The 2-D IDCT (dct2d in inverse mode, 320 cycles)
// follows, and the 64 reconstructed prediction-error samples (or pixels of
// an intra block) are offered in raster order, one signed word each.
module iqidct
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
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_IDCT, S_OUT} state_e;
  state_e   state;
  hdrword_t hdr;
  logic [6:0] cnt;
  logic [5:0] optr;
  logic       d_done, d_busy;
  logic signed [15:0] d_rd, coef;

  dequantizer u_iq (.level(in_data[8:0]), .qp(hdr.qp), .intra(hdr.intra),
                    .is_dc(cnt == 7'd2), .coef(coef));

  dct2d u_idct (
    .clk, .rst_n,
    .wr_en(state == S_LOAD && in_we && cnt > 7'd1),
    .wr_addr(zigzag(6'(cnt - 7'd2))), .wr_data(coef),
    .start(state == S_LOAD && in_we && cnt == 7'd65), .idct(1'b1),
    .busy(d_busy), .done(d_done), .rd_addr(optr), .rd_data(d_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; hdr <= '0; cnt <= '0; optr <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_LOAD; cnt <= '0; optr <= '0;
      end else unique case (state)
        S_LOAD: if (in_we) begin
          if (cnt == 7'd0) hdr.intra <= in_data[15];
          if (cnt == 7'd1) hdr.qp <= in_data[4:0];
          cnt <= cnt + 7'd1;
          if (cnt == 7'd65) state <= S_IDCT;
        end
        S_IDCT: if (d_done) begin state <= S_OUT; done <= 1'b1; end
        S_OUT: if (out_re) begin
          optr <= optr + 6'd1;
          if (optr == 6'd63) state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = word_t'(d_rd);
  assign busy      = (state != S_IDLE);
  logic unused;
  assign unused = ^{d_busy, in_data[15:9]};
endmodule
