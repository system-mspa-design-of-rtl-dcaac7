// me_pe: one processing element of the Window-MSPA motion estimation array.
//
// Each PE owns one horizontal candidate displacement. Every cycle it takes
// the current-macroblock pixel 'c_in' (which reaches PE j j cycles after PE0,
// through the c register chain formed by c_out), picks one of the three
// broadcast search-area ports with 'sel_in', and accumulates |c - s|.
// 'clr_in' marks the first pixel of a new 16x16 window: the finished sum is
// copied to 'sad' with a one-cycle 'sad_valid' pulse and the accumulator
// restarts. The control signals travel with the pixel (sel_out, clr_out,
// en_out), so PE j runs exactly j cycles behind PE0, as in the pixel-flow
// table of the design. Latency: the SAD of a window appears one cycle after
// the clr that follows it.
module me_pe #(
  parameter int unsigned PW   = 8,    // pixel width
  parameter int unsigned SADW = 16    // 256 * 255 fits 16 bits
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en_in,
  input  logic            clr_in,
  input  logic [1:0]      sel_in,
  input  logic [PW-1:0]   c_in,
  input  logic [PW-1:0]   s1, s2, s3,
  output logic            en_out,
  output logic            clr_out,
  output logic [1:0]      sel_out,
  output logic [PW-1:0]   c_out,
  output logic [SADW-1:0] sad,
  output logic            sad_valid
);
  logic [PW-1:0]   s_sel, ad;
  logic [SADW-1:0] acc;
  logic            have;   // accumulator holds a window in progress

  always_comb begin
    unique case (sel_in)
      2'd0:    s_sel = s1;
      2'd1:    s_sel = s2;
      default: s_sel = s3;
    endcase
    ad = (c_in > s_sel) ? c_in - s_sel : s_sel - c_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; have <= 1'b0; sad <= '0; sad_valid <= 1'b0;
      en_out <= 1'b0; clr_out <= 1'b0; sel_out <= '0; c_out <= '0;
    end else begin
      en_out    <= en_in;
      clr_out   <= clr_in;
      sel_out   <= sel_in;
      c_out     <= c_in;
      sad_valid <= 1'b0;
      if (clr_in) begin
        if (have) begin
          sad       <= acc;
          sad_valid <= 1'b1;
        end
        have <= en_in;
        acc  <= en_in ? SADW'(ad) : '0;
      end else if (en_in) begin
        acc <= acc + SADW'(ad);
      end
    end
  end
endmodule
