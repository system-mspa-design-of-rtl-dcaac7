// deblock: deblocking filter module (DB) with two filters in parallel.
//
// Every 16-bit DRAM word holds two neighbouring pixels along the edge, so a
// group of four words (the pixel rows A, B, C, D across the edge) gives two
// filter positions, filtered in parallel by two deblock_filter instances.
// Inputs: one header word (QP in bits 4:0, group count in bits 14:5), then
// the groups. Outputs: the four filtered words A', B', C', D' of each group,
// offered as soon as its fourth word has arrived. The AGU orders the words
// so that horizontal edges are filtered before vertical ones and writes the
// results back to the frame memory.
module deblock
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
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_IN, S_OUT} state_e;
  state_e state;
  logic [4:0]  qp;
  logic [9:0]  ngrp, grp;
  logic [1:0]  cnt, optr;
  word_t       w [4];
  pix_t        f [2][4];

  for (genvar k = 0; k < 2; k++) begin : g_f
    deblock_filter u_f (
      .a(w[0][15-8*k -: 8]), .b(w[1][15-8*k -: 8]),
      .c(w[2][15-8*k -: 8]), .d(w[3][15-8*k -: 8]), .qp,
      .a_o(f[k][0]), .b_o(f[k][1]), .c_o(f[k][2]), .d_o(f[k][3])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; qp <= 5'd1; ngrp <= '0; grp <= '0; cnt <= '0; optr <= '0;
      done <= 1'b0;
      for (int i = 0; i < 4; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) state <= S_HDR;
      else unique case (state)
        S_HDR: if (in_we) begin
          qp <= in_data[4:0]; ngrp <= in_data[14:5]; grp <= '0; cnt <= '0;
          state <= (in_data[14:5] == 10'd0) ? S_IDLE : S_IN;
        end
        S_IN: if (in_we) begin
          w[cnt] <= in_data;
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) begin state <= S_OUT; optr <= '0; end
        end
        S_OUT: if (out_re) begin
          optr <= optr + 2'd1;
          if (optr == 2'd3) begin
            grp <= grp + 10'd1;
            if (grp + 10'd1 == ngrp) begin state <= S_IDLE; done <= 1'b1; end
            else state <= S_IN;
          end
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = {f[0][optr], f[1][optr]};
  assign busy      = (state != S_IDLE);
  logic unused;
  assign unused = in_data[15];
endmodule
