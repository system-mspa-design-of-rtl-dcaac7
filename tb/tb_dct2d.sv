// tb_dct2d: the distributed-arithmetic 2-D DCT and IDCT against a
// floating-point reference (separable orthonormal DCT as used by H.263).
// Every coefficient must be within 1 of the rounded reference value; the
// block time must be 320 cycles (16 one-dimensional lines of 20 cycles).
module tb_dct2d;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, start = 0, idct = 0, busy, done;
  logic [5:0] wr_addr, rd_addr;
  logic signed [15:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  dct2d dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .idct, .busy,
             .done, .rd_addr, .rd_data);

  function automatic real cu(input int u);
    return (u == 0) ? 0.70710678118654752 : 1.0;
  endfunction

  task automatic run(input bit inv, input int blk [64], input int tol);
    real ref_v [64];
    int cyc;
    for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) begin
      real s = 0.0;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        if (!inv)
          s += blk[y*8+x] * $cos((2*y+1)*u*pi/16) * $cos((2*x+1)*v*pi/16);
        else
          s += cu(y) * cu(x) * blk[y*8+x] * $cos((2*u+1)*y*pi/16) * $cos((2*v+1)*x*pi/16);
      ref_v[u*8+v] = inv ? s / 4.0 : s * cu(u) * cu(v) / 4.0;
    end
    for (int i = 0; i < 64; i++) begin
      wr_en <= 1; wr_addr <= 6'(i); wr_data <= 16'(blk[i]);
      @(posedge clk);
    end
    wr_en <= 0; idct <= inv; start <= 1; @(posedge clk); start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != 322) begin failures++; $display("FAIL block time %0d", cyc); end
    for (int i = 0; i < 64; i++) begin
      int e;
      rd_addr = 6'(i); #1;
      e = int'(rd_data) - $rtoi(ref_v[i] + (ref_v[i] >= 0 ? 0.5 : -0.5));
      checks++;
      if (e > tol || e < -tol) begin
        failures++;
        $display("FAIL %s coef %0d: got %0d ref %f", inv ? "IDCT" : "DCT", i, rd_data, ref_v[i]);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    int b [64];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 64; i++) b[i] = int'($urandom % 511) - 255;
      run(0, b, 1);
    end
    for (int i = 0; i < 64; i++) b[i] = 255;
    run(0, b, 1);
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 64; i++) b[i] = (i < 20) ? int'($urandom % 401) - 200 : 0;
      run(1, b, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
