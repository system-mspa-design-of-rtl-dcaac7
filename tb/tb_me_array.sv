// tb_me_array: full-search integer motion estimation against a direct
// computation of all 1024 candidate SADs. Checks the best vector, its SAD,
// the zero-vector SAD and the cycle count (8192 computation cycles plus the
// PE-chain drain). Two frames: random data, and a shifted copy with a known
// displacement.
module tb_me_array;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [7:0] cur [256];
  logic [7:0] sa [48][48];
  logic [7:0] cur_addr;
  logic [7:0] cur_data;
  logic [5:0] sa_row [3], sa_col [3];
  logic [7:0] sa_data [3];
  logic busy, done;
  logic [15:0] best_sad, sad00;
  logic signed [6:0] best_dx, best_dy;
  int checks = 0, failures = 0;

  me_array dut (.clk, .rst_n, .start, .cur_addr, .cur_data, .sa_row, .sa_col,
    .sa_data, .busy, .done, .best_sad, .best_dx, .best_dy, .sad00);

  assign cur_data = cur[cur_addr];
  always_comb for (int p = 0; p < 3; p++) sa_data[p] = sa[sa_row[p]][sa_col[p]];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(input int mode);
    int best, bx, by, s, z, cyc;
    // fill
    for (int r = 0; r < 48; r++) for (int c = 0; c < 48; c++) sa[r][c] = 8'($urandom);
    if (mode == 0) for (int i = 0; i < 256; i++) cur[i] = 8'($urandom);
    else for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      cur[r*16+c] = sa[r + 16 + 5][c + 16 - 9];   // displacement dx=-9, dy=+5
    best = 1 << 30; bx = 0; by = 0;
    for (int v = 0; v < 32; v++) for (int j = 0; j < 32; j++) begin
      s = 0;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int a, b;
        a = cur[r*16+c]; b = sa[r+v][c+j];
        s += (a > b) ? a - b : b - a;
      end
      if (v == 16 && j == 16) z = s;
      if (s < best) begin best = s; bx = j - 16; by = v - 16; end
    end
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    check("best_sad", int'(best_sad), best);
    check("best_dx", int'(best_dx), bx);
    check("best_dy", int'(best_dy), by);
    check("sad00", int'(sad00), z);
    check("cycles", cyc, 8192 + 35);
    if (mode == 1) begin
      check("known dx", int'(best_dx), -9);
      check("known dy", int'(best_dy), 5);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_one(0);
    run_one(1);
    run_one(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
