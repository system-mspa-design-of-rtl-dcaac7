// tb_me: the motion estimation module end to end through its word port.
// A reference model in the testbench repeats the search (integer full
// search, first minimum; then the eight half pel neighbours with the H.263
// bilinear rules; then the intra activity test) and the module's motion word
// and SAD are compared with it. Cases: a block cut at a half pel position
// from the search area, the same at an integer position, and a flat block
// over a noisy reference (INTRA). The cycle count after the last input
// word must stay within the 12000-cycle ME budget.
module tb_me;
  import h263_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_we = 0, out_re = 0;
  word_t in_data, out_data;
  logic out_valid, busy, done;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_intra = 0, n_half = 0;

  me dut (.clk, .rst_n, .start, .in_we, .in_data, .out_valid, .out_re,
          .out_data, .busy, .done);

  int sa [48][48];
  int cur [16][16];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int hp(input int hmx, input int hmy, input int r, input int c);
    int x, y, fx, fy, a, b, cc, d;
    x = (hmx >>> 1) + 16 + c; y = (hmy >>> 1) + 16 + r;
    fx = hmx & 1; fy = hmy & 1;
    a = sa[y][x]; b = sa[y][x+fx]; cc = sa[y+fy][x]; d = sa[y+fy][x+fx];
    if (fx && fy) return (a + b + cc + d + 2) >> 2;
    if (fx) return (a + b + 1) >> 1;
    if (fy) return (a + cc + 1) >> 1;
    return a;
  endfunction

  function automatic int sad_at(input int hmx, input int hmy);
    int s = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
      int p = hp(hmx, hmy, r, c);
      s += (p > cur[r][c]) ? p - cur[r][c] : cur[r][c] - p;
    end
    return s;
  endfunction

  task automatic send_mb(input bit is_cur, input int r0, input int c0);
    int r, c, blk, ln, wd;
    for (int i = 0; i < 128; i++) begin
      blk = i / 32; ln = (i / 4) % 8; wd = i % 4;
      r = r0 + (blk / 2) * 8 + ln; c = c0 + (blk % 2) * 8 + wd * 2;
      in_data <= is_cur ? {8'(cur[r][c]), 8'(cur[r][c+1])}
                        : {8'(sa[r][c]), 8'(sa[r][c+1])};
      in_we <= 1;
      @(posedge clk);
    end
  endtask

  task automatic run_case(input int kind, input int tx, input int ty);
    int best, bx, by, s, mean, act, sum, hbx, hby, hs, cyc;
    bit intra;
    mvword_t mw;
    for (int r = 0; r < 48; r++) for (int c = 0; c < 48; c++)
      sa[r][c] = (kind == 2) ? int'($urandom % 256)
                             : (r * 5 + c * 3 + int'($urandom % 40)) % 256;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      cur[r][c] = (kind == 2) ? 100 + int'($urandom % 3) : hp(tx, ty, r, c);
    // reference model
    best = 1 << 30; bx = 0; by = 0;
    for (int dy = -16; dy < 16; dy++) for (int dx = -16; dx < 16; dx++) begin
      s = sad_at(2 * dx, 2 * dy);
      if (s < best) begin best = s; bx = dx; by = dy; end
    end
    hbx = 2 * bx; hby = 2 * by; hs = best;
    for (int oy = -1; oy <= 1; oy++) for (int ox = -1; ox <= 1; ox++) begin
      int cx, cy;
      cx = 2 * bx + ox; cy = 2 * by + oy;
      if ((ox != 0 || oy != 0) && cx >= -32 && cx <= 31 && cy >= -32 && cy <= 31) begin
        s = sad_at(cx, cy);
        if (s < hs) begin hs = s; hbx = cx; hby = cy; end
      end
    end
    sum = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) sum += cur[r][c];
    mean = sum / 256; act = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      act += (cur[r][c] > mean) ? cur[r][c] - mean : mean - cur[r][c];
    intra = (act + 500) < hs;
    // drive
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    send_mb(1, 0, 0);
    for (int mb = 0; mb < 9; mb++) send_mb(0, (mb / 3) * 16, (mb % 3) * 16);
    in_we <= 0;
    cyc = 0;
    while (!out_valid) begin @(posedge clk); cyc++; end
    mw = mvword_t'(out_data);
    check("intra", int'(mw.intra), int'(intra));
    if (!intra) begin
      check("mvx", int'(signed'(mw.mvx)), hbx);
      check("mvy", int'(signed'(mw.mvy)), hby);
    end
    out_re <= 1; @(posedge clk); out_re <= 0; @(posedge clk);
    check("sad", int'(out_data), hs);
    out_re <= 1; @(posedge clk); out_re <= 0;
    checks++;
    if (cyc > 12000) begin failures++; $display("FAIL ME took %0d cycles", cyc); end
    if (kind == 0) check("target sad 0", hs, 0);
    if (intra) n_intra++;
    if ((hbx & 1) || (hby & 1)) n_half++;
    $display("case %0d: mv (%0d,%0d) sad %0d intra %0d, %0d cycles", kind, hbx, hby, hs, intra, cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run_case(0, 7, -11);
    run_case(0, -32, 31);
    run_case(1, 4, 6);
    run_case(2, 0, 0);
    checks++;
    if (n_intra == 0 || n_half == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
