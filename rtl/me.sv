// me: motion estimation module (Window-MSPA integer search + half pel stage).
//
// Module port convention shared by all dedicated modules: 'start' clears the
// module and arms it; the AGU then writes input words with 'in_we'; the
// module begins by itself once its last input word has arrived; each result
// word is offered on 'out_data' with 'out_valid' and consumed by 'out_re';
// 'done' pulses when the work is finished.
//
// Inputs (1280 words, two pixels per word, left pixel in bits 15:8, each
// 8x8 block sent line by line as 4 words, luminance blocks Y0..Y3):
//   words    0..127  current macroblock
//   words  128..1279 the 3x3 macroblocks of the previous picture around it,
//                    raster order, forming the 48x48 search area.
// Outputs: word 0 = motion word (h263_pkg::mvword_t: intra flag and the
// half pel vector), word 1 = its SAD.
// Timing: 8227 cycles of integer search (me_array), then about 2700 cycles
// of half pel search and intra test, so about 11k cycles after the last
// input word, within the 12000-cycle first pipeline stage.
module me
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
  localparam int unsigned NIN = 128 + 9 * 128;

  logic [7:0] cur_mem [256];
  logic [7:0] sa_mem  [48][48];

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INT, S_HALF, S_OUT} state_e;
  state_e state;
  logic [10:0] wcnt;
  logic [1:0]  optr;

  // ---- input address decode ---------------------------------------------
  logic [6:0] w;          // word within a macroblock
  logic [3:0] m;          // macroblock 0 = current, 1..9 = search
  logic [4:0] prow;       // pixel row within the MB
  logic [3:0] pcol;       // pixel column of the left pixel
  always_comb begin
    m    = (wcnt < 11'd128) ? 4'd0 : 4'(((wcnt - 11'd128) >> 7) + 11'd1);
    w    = wcnt[6:0];
    prow = 5'({w[6], w[4:2]});                  // block row*8 + line
    pcol = {w[5], w[1:0], 1'b0};                // block col*8 + word*2
  end

  always_ff @(posedge clk) begin
    if (in_we && state == S_LOAD) begin
      if (m == 4'd0) begin
        cur_mem[{prow[3:0], pcol}]        <= in_data[15:8];
        cur_mem[{prow[3:0], pcol | 4'd1}] <= in_data[7:0];
      end else begin
        logic [5:0] rr, cc;
        rr = 6'(((m - 4'd1) / 4'd3) * 5'd16 + 6'(prow));
        cc = 6'(((m - 4'd1) % 4'd3) * 5'd16 + 6'(pcol));
        sa_mem[rr][cc]        <= in_data[15:8];
        sa_mem[rr][cc + 6'd1] <= in_data[7:0];
      end
    end
  end

  // ---- integer stage ---------------------------------------------------------
  logic [7:0]  a_cur_addr, h_cur_addr;
  logic [5:0]  a_row [3], a_col [3];
  logic [7:0]  a_data [3];
  logic        a_busy, a_done, a_start;
  logic [15:0] a_sad, a_sad00;
  logic signed [6:0] a_dx, a_dy;

  always_comb for (int p = 0; p < 3; p++) a_data[p] = sa_mem[a_row[p]][a_col[p]];

  me_array u_array (
    .clk, .rst_n, .start(a_start), .cur_addr(a_cur_addr),
    .cur_data(cur_mem[a_cur_addr]), .sa_row(a_row), .sa_col(a_col),
    .sa_data(a_data), .busy(a_busy), .done(a_done), .best_sad(a_sad),
    .best_dx(a_dx), .best_dy(a_dy), .sad00(a_sad00)
  );

  // ---- half pel stage ------------------------------------------------------
  logic [5:0]  h_row, h_cola, h_colb;
  logic        h_busy, h_done, h_start, h_intra;
  logic signed [6:0] h_mvx, h_mvy;
  logic [15:0] h_sad;

  me_halfpel u_half (
    .clk, .rst_n, .start(h_start), .int_dx(a_dx), .int_dy(a_dy),
    .int_sad(a_sad), .cur_addr(h_cur_addr), .cur_data(cur_mem[h_cur_addr]),
    .sa_row(h_row), .sa_col_a(h_cola), .sa_col_b(h_colb),
    .sa_a(sa_mem[h_row][h_cola]), .sa_b(sa_mem[h_row][h_colb]),
    .busy(h_busy), .done(h_done), .mvx(h_mvx), .mvy(h_mvy), .sad(h_sad),
    .intra(h_intra)
  );

  assign a_start = (state == S_LOAD) && in_we && (wcnt == 11'(NIN - 1));
  assign h_start = a_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; wcnt <= '0; optr <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_LOAD; wcnt <= '0; optr <= '0;
      end else begin
        unique case (state)
          S_LOAD: if (in_we) begin
            wcnt <= wcnt + 11'd1;
            if (wcnt == 11'(NIN - 1)) state <= S_INT;
          end
          S_INT:  if (a_done) state <= S_HALF;
          S_HALF: if (h_done) begin state <= S_OUT; done <= 1'b1; end
          S_OUT:  if (out_re) begin
            optr <= optr + 2'd1;
            if (optr == 2'd1) state <= S_IDLE;
          end
          default: ;
        endcase
      end
    end
  end

  mvword_t mvw;
  always_comb begin
    mvw = '{intra: h_intra, mvx: h_intra ? 7'd0 : 7'(h_mvx),
            mvy: h_intra ? 7'd0 : 7'(h_mvy), rsv: 1'b0};
    out_valid = (state == S_OUT);
    out_data  = (optr == 2'd0) ? word_t'(mvw) : h_sad;
  end

  assign busy = (state != S_IDLE);

  // unused diagnostic outputs of the sub-blocks
  logic unused;
  assign unused = ^{a_busy, h_busy, a_sad00};
endmodule
