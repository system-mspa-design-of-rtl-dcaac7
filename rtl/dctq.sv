// dctq: DCT-Q module. One 8x8 block per run.
//
// Word port as for every dedicated module (see me.sv). Inputs: the
// macroblock's motion word (bit 15: intra), a QP word (bits 4:0) and 64
// prediction-error
// samples in raster order (signed, or pixels for intra blocks). The block
// goes through the 2-D distributed-arithmetic DCT (dct2d, 320 cycles);
// the 64 quantized levels are then offered in zigzag order, one word each
// (signed, sign-extended), quantized on the fly as the AGU reads them.
module dctq
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
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DCT, S_OUT} state_e;
  state_e   state;
  hdrword_t hdr;
  logic [6:0] cnt;
  logic [5:0] optr;
  logic       d_done, d_busy;
  logic signed [15:0] d_rd;
  logic signed [8:0]  lvl;

  dct2d u_dct (
    .clk, .rst_n,
    .wr_en(state == S_LOAD && in_we && cnt > 7'd1), .wr_addr(6'(cnt - 7'd2)),
    .wr_data(signed'(in_data)),
    .start(state == S_LOAD && in_we && cnt == 7'd65), .idct(1'b0),
    .busy(d_busy), .done(d_done), .rd_addr(zigzag(optr)), .rd_data(d_rd)
  );

  quantizer u_q (.coef(d_rd), .qp(hdr.qp), .intra(hdr.intra),
                 .is_dc(optr == 6'd0), .level(lvl));

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
          if (cnt == 7'd65) state <= S_DCT;
        end
        S_DCT: if (d_done) begin state <= S_OUT; done <= 1'b1; end
        S_OUT: if (out_re) begin
          optr <= optr + 6'd1;
          if (optr == 6'd63) state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = word_t'(16'(lvl));
  assign busy      = (state != S_IDLE);
  logic unused;
  assign unused = d_busy;
endmodule
