// me_halfpel: half pixel refinement and INTRA/INTER decision of the motion
// estimator (second ME stage).
//
// One processor, run after the integer search:
//   1. 256 cycles: sum of the current macroblock -> mean (sum/256).
//   2. 256 cycles: A = sum |c - mean|, the intra activity.
//   3. for each of the 8 half pel neighbours (-0.5/0/+0.5 in x and y) of the
//      integer vector, 16 (or 17 with vertical half pel) rows of 16 pixel
//      pairs go through halfpel_interp and the SAD against the current block
//      is accumulated; candidates outside [-16, 15.5] are skipped.
// The smallest of the integer SAD and the eight half pel SADs gives the
// vector (half pel units). MBTYPE is INTRA when A < SAD - INTRA_BIAS (the
// usual H.263 test-model rule; the document says only that the block sum is
// compared with the distortion). Memories are outside: 'cur_addr' reads the
// current block, two ports read the 48x48 search area (row, col) with
// combinational data. Run time about 512 + 8*272 cycles.
module me_halfpel #(
  parameter int unsigned INTRA_BIAS = 500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic signed [6:0] int_dx,     // integer vector, -16..15
  input  logic signed [6:0] int_dy,
  input  logic [15:0]       int_sad,
  output logic [7:0]        cur_addr,
  input  logic [7:0]        cur_data,
  output logic [5:0]        sa_row,
  output logic [5:0]        sa_col_a,
  output logic [5:0]        sa_col_b,
  input  logic [7:0]        sa_a,
  input  logic [7:0]        sa_b,
  output logic              busy,
  output logic              done,
  output logic signed [6:0] mvx,        // half pel units, -32..31
  output logic signed [6:0] mvy,
  output logic [15:0]       sad,
  output logic              intra
);
  typedef enum logic [2:0] {S_IDLE, S_SUM, S_DEV, S_CAND, S_NEXT, S_DONE} state_e;
  state_e state;

  logic [7:0]  k;          // pixel counter for SUM/DEV
  logic [15:0] sum;
  logic [7:0]  mean;
  logic [15:0] act;
  logic [3:0]  cand;       // 0..8, 4 = centre (skipped)
  logic [4:0]  rin;        // input row 0..16
  logic [3:0]  cin;
  logic [15:0] csad;
  logic signed [2:0] ox, oy;
  logic hx, hy;
  logic signed [6:0] bx, by;     // integer base of the candidate
  logic signed [7:0] hmx, hmy;   // candidate vector, half pel units
  logic cand_ok;
  logic iv, iov;
  logic [7:0] ipix, ad;
  logic [3:0] orow;

  always_comb begin
    ox  = 3'(signed'({1'b0, cand % 3})) - 3'sd1;
    oy  = 3'(signed'({1'b0, cand / 3})) - 3'sd1;
    hx  = (ox != 0);
    hy  = (oy != 0);
    bx  = int_dx - ((ox < 0) ? 7'sd1 : 7'sd0);
    by  = int_dy - ((oy < 0) ? 7'sd1 : 7'sd0);
    hmx = 8'(int_dx) * 8'sd2 + 8'(ox);
    hmy = 8'(int_dy) * 8'sd2 + 8'(oy);
    cand_ok = (cand != 4) && hmx >= -8'sd32 && hmx <= 8'sd31 &&
              hmy >= -8'sd32 && hmy <= 8'sd31;
    sa_row   = 6'(7'(by) + 7'sd16 + 7'(rin));
    sa_col_a = 6'(7'(bx) + 7'sd16 + 7'(cin));
    sa_col_b = 6'(7'(bx) + 7'sd17 + 7'(cin));
    iv   = (state == S_CAND);
    orow = hy ? 4'(rin - 5'd1) : rin[3:0];
    cur_addr = (state == S_CAND) ? {orow, cin} : k;
    ad = (ipix > cur_data) ? ipix - cur_data : cur_data - ipix;
  end

  halfpel_interp #(.W(16)) u_interp (
    .clk, .rst_n, .valid(iv), .first_row(rin == 5'd0), .hx, .hy,
    .a(sa_a), .b(sa_b), .out_valid(iov), .out_pix(ipix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; sum <= '0; mean <= '0; act <= '0;
      cand <= '0; rin <= '0; cin <= '0; csad <= '0; done <= 1'b0;
      mvx <= '0; mvy <= '0; sad <= '0; intra <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SUM; k <= '0; sum <= '0; act <= '0;
          mvx <= 7'(int_dx * 7'sd2); mvy <= 7'(int_dy * 7'sd2); sad <= int_sad;
        end
        S_SUM: begin
          sum <= sum + 16'(cur_data);
          k   <= k + 8'd1;
          if (k == 8'd255) begin
            mean  <= 8'((sum + 16'(cur_data)) >> 8);
            state <= S_DEV;
          end
        end
        S_DEV: begin
          act <= act + 16'((cur_data > mean) ? cur_data - mean : mean - cur_data);
          k   <= k + 8'd1;
          if (k == 8'd255) begin
            state <= S_NEXT; cand <= '0;
          end
        end
        S_NEXT: begin
          // enter candidate 'cand' or skip it
          if (cand == 4'd9) state <= S_DONE;
          else if (!cand_ok) cand <= cand + 4'd1;
          else begin state <= S_CAND; rin <= '0; cin <= '0; csad <= '0; end
        end
        S_CAND: begin
          logic [15:0] nsad;
          nsad = csad + (iov ? 16'(ad) : 16'd0);
          csad <= nsad;
          cin  <= cin + 4'd1;
          if (cin == 4'd15) begin
            rin <= rin + 5'd1;
            if (rin == (hy ? 5'd16 : 5'd15)) begin
              if (nsad < sad) begin
                sad <= nsad; mvx <= 7'(hmx); mvy <= 7'(hmy);
              end
              cand  <= cand + 4'd1;
              state <= S_NEXT;
            end
          end
        end
        S_DONE: begin
          intra <= ({16'd0, act} + 32'(INTRA_BIAS)) < {16'd0, sad};
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
