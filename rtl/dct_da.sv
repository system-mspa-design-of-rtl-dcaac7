// dct_da: 8-point 1-D DCT / IDCT by distributed arithmetic.
//
// 'load' copies eight 16-bit words into the input registers. For the
// forward DCT, four bit-serial adders and four bit-serial subtractors (one
// carry flip-flop each) form x_n + x_7-n and x_n - x_7-n LSB first; the sum
// bits form the address bus of the even RACs (outputs 0,2,4,6) and the
// difference bits that of the odd RACs. For the IDCT the bits of X0,X2,X4,X6
// and X1,X3,X5,X7 address the RACs directly; RACs 0..3 build the even parts
// e_i and RACs 4..7 the odd parts o_i, and the output stage forms
// x_i = e_i + o_i, x_7-i = e_i - o_i. After 16 bit cycles the results,
// shifted right by 'oshift' with rounding and saturated to 16 bits, go to the
// output registers: 'done' pulses 17 cycles after 'load'.
// The forward path needs |x| < 2^14 so that the pre-adder sums fit 16 bits.
module dct_da (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               idct,
  input  logic [4:0]         oshift,
  input  logic signed [15:0] x [8],
  output logic               busy,
  output logic               done,
  output logic signed [15:0] y [8]
);
  logic [15:0] sr [8];          // input shift registers, LSB out first
  logic [3:0]  carry;           // serial adders (0..3) / subtractors: borrow
  logic [3:0]  bcarry;
  logic [3:0]  bitidx;
  logic        run, mode;
  logic [4:0]  osh;
  logic [3:0]  ebus, obus;
  logic [3:0]  sbit, dbit;
  logic signed [31:0] acc [8];
  logic fin;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      // bit-serial adder and subtractor (subtract = add inverted + 1)
      sbit[n] = sr[n][0] ^ sr[7-n][0] ^ carry[n];
      dbit[n] = sr[n][0] ^ ~sr[7-n][0] ^ bcarry[n];
    end
    if (mode) begin
      for (int m = 0; m < 4; m++) begin
        ebus[m] = sr[2*m][0];
        obus[m] = sr[2*m+1][0];
      end
    end else begin
      ebus = sbit;
      obus = dbit;
    end
  end

  // RAC k < 4: forward output 2k / inverse even part e_k (even bus);
  // RAC k >= 4: forward output 2(k-4)+1 / inverse odd part o_k-4 (odd bus).
  for (genvar k = 0; k < 8; k++) begin : g_rac
    rac #(.K(k)) u_rac (
      .clk, .rst_n, .en(run), .clr(bitidx == 4'd0), .bitidx,
      .idct(mode), .addr((k < 4) ? ebus : obus), .acc(acc[k])
    );
  end

  function automatic logic signed [15:0] rnd_sat(input logic signed [31:0] v,
                                                 input logic [4:0] s);
    logic signed [31:0] r;
    r = (s == 0) ? v : (v + (32'sd1 <<< (s - 5'd1))) >>> s;
    if (r > 32'sd32767)  return 16'sd32767;
    if (r < -32'sd32768) return -16'sd32768;
    return 16'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; mode <= 1'b0; osh <= '0; bitidx <= '0; done <= 1'b0;
      carry <= '0; bcarry <= '1;
      for (int i = 0; i < 8; i++) begin sr[i] <= '0; y[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (load && !run) begin
        for (int i = 0; i < 8; i++) sr[i] <= x[i];
        run <= 1'b1; mode <= idct; osh <= oshift; bitidx <= '0;
        carry <= '0; bcarry <= '1;
      end else if (run) begin
        for (int i = 0; i < 8; i++) sr[i] <= {sr[i][15], sr[i][15:1]};
        for (int n = 0; n < 4; n++) begin
          carry[n]  <= (sr[n][0] & sr[7-n][0]) | (carry[n] & (sr[n][0] ^ sr[7-n][0]));
          bcarry[n] <= (sr[n][0] & ~sr[7-n][0]) | (bcarry[n] & (sr[n][0] ^ ~sr[7-n][0]));
        end
        bitidx <= bitidx + 4'd1;
        if (bitidx == 4'd15) run <= 1'b0;
      end
      if (fin) begin
        done <= 1'b1;
        if (!mode) begin
          for (int k = 0; k < 4; k++) begin
            y[2*k]   <= rnd_sat(acc[k], osh);
            y[2*k+1] <= rnd_sat(acc[k+4], osh);
          end
        end else begin
          for (int i = 0; i < 4; i++) begin
            y[i]   <= rnd_sat(acc[i] + acc[i+4], osh);
            y[7-i] <= rnd_sat(acc[i] - acc[i+4], osh);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fin <= 1'b0;
    else fin <= run && (bitidx == 4'd15);

  assign busy = run | fin;
endmodule
