// tb_quantizer: the H.263 quantizer and inverse quantizer against the
// formulas computed with integer division in the testbench, over all QP and
// a sweep of coefficient values, intra and inter, DC and AC.
module tb_quantizer;
  logic signed [15:0] coef, rcoef;
  logic [4:0] qp;
  logic intra, is_dc;
  logic signed [8:0] level, qlevel;
  int checks = 0, failures = 0;

  quantizer   u_q  (.coef, .qp, .intra, .is_dc, .level(qlevel));
  dequantizer u_iq (.level, .qp, .intra, .is_dc, .coef(rcoef));

  function automatic int q_ref(input int c, input int q, input bit in, input bit dc);
    int a, l;
    if (in && dc) begin
      l = (c + 4) / 8;
      if (c + 4 < 0) l = 0;
      return (l < 1) ? 1 : (l > 254) ? 254 : l;
    end
    a = (c < 0) ? -c : c;
    l = in ? a / (2 * q) : ((a - q / 2) < 0 ? 0 : (a - q / 2) / (2 * q));
    if (l > 127) l = 127;
    return (c < 0) ? -l : l;
  endfunction

  function automatic int iq_ref(input int l, input int q, input bit in, input bit dc);
    int a, m;
    if (in && dc) return 8 * l;
    if (l == 0) return 0;
    a = (l < 0) ? -l : l;
    m = q * (2 * a + 1) - ((q % 2 == 0) ? 1 : 0);
    m = (l < 0) ? -m : m;
    return (m > 2047) ? 2047 : (m < -2048) ? -2048 : m;
  endfunction

  initial begin
    for (int q = 1; q < 32; q++)
      for (int c = -2048; c < 2048; c += 7)
        for (int m = 0; m < 3; m++) begin
          coef = 16'(c); qp = 5'(q); intra = (m != 0); is_dc = (m == 2);
          if (is_dc && c < 0) continue;
          level = 9'(q_ref(c, q, intra, is_dc) % 256);
          #1;
          checks++;
          if (int'(qlevel) != q_ref(c, q, intra, is_dc)) begin
            failures++;
            if (failures < 10) $display("FAIL Q c=%0d qp=%0d m=%0d got %0d exp %0d", c, q, m, qlevel, q_ref(c, q, intra, is_dc));
          end
          checks++;
          if (is_dc == 0 && int'(rcoef) != iq_ref(int'(level), q, intra, is_dc)) begin
            failures++;
            if (failures < 10) $display("FAIL IQ l=%0d qp=%0d got %0d exp %0d", level, q, rcoef, iq_ref(int'(level), q, intra, is_dc));
          end
        end
    for (int l = -127; l <= 127; l++) begin
      level = 9'(l); qp = 5'd31; intra = 0; is_dc = 0; #1;
      checks++;
      if (int'(rcoef) != iq_ref(l, 31, 0, 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
