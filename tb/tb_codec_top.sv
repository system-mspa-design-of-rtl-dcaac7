// tb_codec_top: the whole encoder system on two macroblocks of a QCIF frame.
//
// The PC interface loads a reference picture into the DRAM model and the
// AGU program into the AGU; the camera interface then captures the current
// picture (every line, luminance and chrominance) into DRAM while the AGU
// spins in a wait loop, taking the bus between instructions. The program
// encodes two macroblocks through one subroutine: ME (integer + half pel,
// INTRA/INTER decision), Err, DCT-Q and IQ-IDCT for the six blocks, P frame
// reconstruction into a third frame, and finally the deblocking filter on
// two groups across a block edge. Checks:
//   - macroblock A, cut from the reference at vector (+2.5, -1.5) plus
//     noise: motion word (5, -3), INTER; macroblock B, flat: INTRA
//   - reconstructed macroblocks close to the captured ones
//     (quantization error only)
//   - deblocking output equal to the Annex J filter computed here
//   - PC interactive mode (DRAM reads through the PC port), emulation mode
//     (a run limited to 3 instructions stops at the right place)
//   - each mechanism seen at least once: camera bus grants, half pel vector,
//     INTER and INTRA decisions, subroutine call, loop, filter changing
//     pixels, emulation stop.
module tb_codec_top;
  import h263_pkg::*;
  import agu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mem_en, mem_we;
  addr_t mem_addr;
  word_t mem_wdata, mem_rdata;
  logic cam_frame_start = 0, cam_line_start = 0, cam_pix_valid = 0;
  pix_t cam_pix = '0;
  logic cam_overrun, cam_frame_done;
  logic pc_cmd_valid = 0;
  logic [2:0] pc_cmd = '0;
  logic [17:0] pc_addr = '0;
  logic [31:0] pc_wdata = '0;
  logic pc_cmd_ready, pc_rvalid;
  logic [31:0] pc_rdata;

  codec_top dut (
    .clk, .rst_n, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .cam_frame_start, .cam_line_start, .cam_pix_valid, .cam_pix,
    .cam_frame_base(18'd0), .cam_overrun, .cam_frame_done,
    .pc_cmd_valid, .pc_cmd, .pc_addr, .pc_wdata, .pc_cmd_ready, .pc_rvalid,
    .pc_rdata
  );
  dram_model u_dram (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                     .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // ---- memory map ----------------------------------------------------------
  localparam int CUR = 0, REF = 25344, REC = 50688, PAR = 76032;
  localparam int MVW = PAR, QPW = PAR + 4, DBH = PAR + 5, DBO = PAR + 8;
  localparam int ERRA = PAR + 16, LVLA = ERRA + 384, RERA = LVLA + 384;
  localparam int QP = 2, DBQP = 20;
  localparam int MVX = 5, MVY = -3;

  function automatic int laddr(input int base, input int x, input int y);
    return base + ((y >> 4) * 12 + (x >> 4)) * 192 + (((y >> 3) & 1) * 2 + ((x >> 3) & 1)) * 32
           + (y & 7) * 4 + ((x & 7) >> 1);
  endfunction
  function automatic int caddr(input int base, input int p, input int x, input int y);
    return base + ((y >> 3) * 12 + (x >> 3)) * 192 + (3 + p) * 32 + (y & 7) * 4 + ((x & 7) >> 1);
  endfunction
  function automatic int hsh(input int x, input int y, input int s);
    int unsigned h;
    h = x * 1103515245 + y * 12345 + s * 2654435761 + x * y * 97;
    h = h ^ (h >> 13); h = h * 1274126177; h = h ^ (h >> 16);
    return int'(h & 255);
  endfunction
  function automatic int refp(input int p, input int x, input int y);
    int mx, my;
    mx = (p == 0) ? 191 : 95; my = (p == 0) ? 175 : 87;
    x = (x < 0) ? 0 : (x > mx) ? mx : x;
    y = (y < 0) ? 0 : (y > my) ? my : y;
    return hsh(x, y, p + 1);
  endfunction
  function automatic int interp(input int p, input int x, input int y, input int vx, input int vy);
    int x0, y0, fx, fy, a, b, c, d;
    x0 = x + (vx >>> 1); y0 = y + (vy >>> 1); fx = vx & 1; fy = vy & 1;
    a = refp(p, x0, y0); b = refp(p, x0 + 1, y0); c = refp(p, x0, y0 + 1); d = refp(p, x0 + 1, y0 + 1);
    if (fx && fy) return (a + b + c + d + 2) >> 2;
    if (fx) return (a + b + 1) >> 1;
    if (fy) return (a + c + 1) >> 1;
    return a;
  endfunction
  function automatic int cmv(input int v);
    int a, c;
    a = (v < 0) ? -v : v; c = (a >> 1) | (a & 1);
    return (v < 0) ? -c : c;
  endfunction
  // current picture sent by the camera
  function automatic int curp(input int p, input int x, input int y);
    int v, n;
    bit inb;
    inb = (p == 0) ? (x >= 80 && x < 96 && y >= 64 && y < 80)
                   : (x >= 40 && x < 48 && y >= 32 && y < 40);
    n = hsh(x, y, 7 + p);
    if (inb) return (p == 0) ? 100 + ((((y & 15) >= 8) ? 6 : 0)) + (n & 1) : 120 + (n & 1);
    if (p == 0) v = interp(0, x, y, MVX, MVY);
    else v = interp(p, x, y, cmv(MVX), cmv(MVY));
    v = v + (n % 5) - 2;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // ---- PC port ---------------------------------------------------------------
  task automatic pc(input int cmd, input int addr, input int unsigned wdata);
    pc_cmd_valid <= 1; pc_cmd <= 3'(cmd); pc_addr <= 18'(addr); pc_wdata <= wdata;
    @(posedge clk);
    while (!pc_cmd_ready) @(posedge clk);
    pc_cmd_valid <= 0;
    @(posedge clk);
  endtask
  task automatic pc_read(input int cmd, input int addr, output int unsigned val);
    pc_cmd_valid <= 1; pc_cmd <= 3'(cmd); pc_addr <= 18'(addr);
    @(posedge clk);
    pc_cmd_valid <= 0;
    while (!pc_rvalid) @(posedge clk);
    val = pc_rdata;
    @(posedge clk);
  endtask

  // ---- program assembly --------------------------------------------------
  instr_t prog [$];
  function automatic void emit(input op_e op, input int unit = 0, input int ra = 0,
                               input int rb = 0, input int imm = 0);
    prog.push_back(mk(op, unit, ra, rb, imm));
  endfunction
  function automatic int here();
    return prog.size();
  endfunction
  localparam int WIN9 = 8 | (8 << 4) | (1 << 10);

  int enc_addr, patch_jsr, l0, l1, l2, l3, l4;
  function automatic void build();
    // main
    emit(OP_LDI, 0, 0, 0, 40000);
    l0 = here(); emit(OP_DJNZ, 0, 0, 0, l0);             // camera fills the frame
    emit(OP_SIG, 0, 0, 0, 1);
    emit(OP_LDI, 0, 2, 0, laddr(CUR, 32, 32));           // macroblock A (2,2)
    emit(OP_LDI, 0, 1, 0, laddr(REF, 16, 16));
    emit(OP_LDI, 0, 3, 0, (32 << 9) | 32);
    emit(OP_LDI, 0, 4, 0, (16 << 9) | 16);
    patch_jsr = here(); emit(OP_JSR, 0, 0, 0, 0);
    emit(OP_LDI, 0, 2, 0, laddr(CUR, 80, 64));           // macroblock B (5,4)
    emit(OP_LDI, 0, 1, 0, laddr(REF, 64, 48));
    emit(OP_LDI, 0, 3, 0, (64 << 9) | 80);
    emit(OP_LDI, 0, 4, 0, (32 << 9) | 40);
    emit(OP_JSR, 0, 0, 0, 0);
    emit(OP_SIG, 0, 0, 0, 2);
    // deblocking: edge between Y0 and Y2 of macroblock B, word columns 0, 1
    emit(OP_START, MOD_DB);
    emit(OP_LDI, 0, 7, 0, DBH); emit(OP_RD, MOD_DB, 7, 0, 1);
    emit(OP_LDI, 0, 5, 0, DBO);
    for (int wc = 0; wc < 2; wc++) begin
      for (int row = 6; row < 10; row++) begin
        emit(OP_LDI, 0, 7, 0, laddr(REC, 80 + 2 * wc, 64 + row));
        emit(OP_RD, MOD_DB, 7, 0, 1);
      end
      emit(OP_WR, MOD_DB, 5, 0, 4);
    end
    emit(OP_WAIT, MOD_DB);
    emit(OP_HALT);
    // subroutine: encode one macroblock
    enc_addr = here();
    prog[patch_jsr].imm = 17'(enc_addr);
    prog[patch_jsr + 5].imm = 17'(enc_addr);
    emit(OP_START, MOD_ME);
    emit(OP_RD, MOD_ME, 2, 0, 128);
    emit(OP_ADDI, 0, 2, 0, -128);
    emit(OP_LDI, 0, 0, 0, 3);
    l1 = here();
    emit(OP_RD, MOD_ME, 1, 0, 128); emit(OP_ADDI, 0, 1, 0, 64);
    emit(OP_RD, MOD_ME, 1, 0, 128); emit(OP_ADDI, 0, 1, 0, 64);
    emit(OP_RD, MOD_ME, 1, 0, 128); emit(OP_ADDI, 0, 1, 0, 64 + 9 * 192);
    emit(OP_DJNZ, 0, 0, 0, l1);
    emit(OP_WAIT, MOD_ME);
    emit(OP_LDI, 0, 7, 0, MVW); emit(OP_WR, MOD_ME, 7, 0, 2);
    emit(OP_LDI, 0, 7, 0, MVW); emit(OP_LDM, 0, 6, 7);
    // Err
    emit(OP_START, MOD_ERR);
    emit(OP_LDI, 0, 7, 0, MVW); emit(OP_RD, MOD_ERR, 7, 0, 1);
    emit(OP_LDI, 0, 0, 0, REF); emit(OP_LDI, 0, 5, 0, ERRA);
    for (int b = 0; b < 6; b++) begin
      emit(OP_WIN, MOD_ERR, 0, (b < 4) ? 3 : 4, WIN9 | ((b < 4) ? 0 : (b - 3)) << 8);
      emit(OP_RD, MOD_ERR, 2, 0, 32);
      emit(OP_WR, MOD_ERR, 5, 0, 64);
      if (b == 0 || b == 2) emit(OP_ADDI, 0, 3, 0, 8);
      if (b == 1) emit(OP_ADDI, 0, 3, 0, (8 << 9) - 8);
      if (b == 3) emit(OP_ADDI, 0, 3, 0, -((8 << 9) + 8));
    end
    emit(OP_ADDI, 0, 2, 0, -192);
    emit(OP_WAIT, MOD_ERR);
    // DCT-Q, six blocks
    emit(OP_LDI, 0, 5, 0, ERRA); emit(OP_LDI, 0, 7, 0, LVLA); emit(OP_LDI, 0, 0, 0, 6);
    l2 = here();
    emit(OP_START, MOD_DCTQ);
    emit(OP_LDI, 0, 1, 0, MVW); emit(OP_RD, MOD_DCTQ, 1, 0, 1);
    emit(OP_LDI, 0, 1, 0, QPW); emit(OP_RD, MOD_DCTQ, 1, 0, 1);
    emit(OP_RD, MOD_DCTQ, 5, 0, 64);
    emit(OP_WAIT, MOD_DCTQ);
    emit(OP_WR, MOD_DCTQ, 7, 0, 64);
    emit(OP_DJNZ, 0, 0, 0, l2);
    // IQ-IDCT, six blocks
    emit(OP_LDI, 0, 5, 0, LVLA); emit(OP_LDI, 0, 7, 0, RERA); emit(OP_LDI, 0, 0, 0, 6);
    l3 = here();
    emit(OP_START, MOD_IQIDCT);
    emit(OP_LDI, 0, 1, 0, MVW); emit(OP_RD, MOD_IQIDCT, 1, 0, 1);
    emit(OP_LDI, 0, 1, 0, QPW); emit(OP_RD, MOD_IQIDCT, 1, 0, 1);
    emit(OP_RD, MOD_IQIDCT, 5, 0, 64);
    emit(OP_WAIT, MOD_IQIDCT);
    emit(OP_WR, MOD_IQIDCT, 7, 0, 64);
    emit(OP_DJNZ, 0, 0, 0, l3);
    // P frame reconstruction, line by line
    emit(OP_START, MOD_PRECON);
    emit(OP_LDI, 0, 7, 0, MVW); emit(OP_RD, MOD_PRECON, 7, 0, 1);
    emit(OP_LDI, 0, 0, 0, REF); emit(OP_LDI, 0, 5, 0, RERA);
    emit(OP_LDI, 0, 7, 0, REC); emit(OP_ADD, 0, 7, 2);
    for (int b = 0; b < 6; b++) begin
      emit(OP_WIN, MOD_PRECON, 0, (b < 4) ? 3 : 4, WIN9 | ((b < 4) ? 0 : (b - 3)) << 8);
      emit(OP_LDI, 0, 1, 0, 8);
      l4 = here();
      emit(OP_RD, MOD_PRECON, 5, 0, 8);
      emit(OP_WR, MOD_PRECON, 7, 0, 4);
      emit(OP_DJNZ, 0, 1, 0, l4);
      if (b == 0 || b == 2) emit(OP_ADDI, 0, 3, 0, 8);
      if (b == 1) emit(OP_ADDI, 0, 3, 0, (8 << 9) - 8);
      if (b == 3) emit(OP_ADDI, 0, 3, 0, -((8 << 9) + 8));
    end
    emit(OP_WAIT, MOD_PRECON);
    emit(OP_RET);
  endfunction

  // ---- camera ------------------------------------------------------------------
  task automatic camera_frame();
    cam_frame_start <= 1; @(posedge clk); cam_frame_start <= 0;
    for (int y = 0; y < 144; y++) begin
      cam_line_start <= 1; @(posedge clk); cam_line_start <= 0;
      for (int i = 0; i < ((y % 2 == 0) ? 352 : 176); i++) begin
        int v;
        if (i < 176) v = curp(0, i, y);
        else if (i < 264) v = curp(1, i - 176, y / 2);
        else v = curp(2, i - 264, y / 2);
        cam_pix_valid <= 1; cam_pix <= 8'(v);
        @(posedge clk);
      end
      cam_pix_valid <= 0;
      @(posedge clk);
    end
  endtask

  // ---- reference deblocking filter -------------------------------------------
  function automatic int tdiv(input int x, input int y);
    return (x < 0) ? -((-x) / y) : x / y;
  endfunction
  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int strength(input int q);
    int t [32] = '{0,1,1,2,2,3,3,4,4,4,5,5,6,6,7,7,7,8,8,8,9,9,9,10,10,10,11,11,11,12,12,12};
    return t[q];
  endfunction

  int n_gnt = 0, n_jsr = 0, n_djnz = 0;
  always @(posedge clk) begin
    if (dut.cam_gnt && !dut.halted) n_gnt++;
    if (dut.u_agu.state == dut.u_agu.S_EXEC && dut.u_agu.ir.op == OP_JSR) n_jsr++;
    if (dut.u_agu.state == dut.u_agu.S_EXEC && dut.u_agu.ir.op == OP_DJNZ) n_djnz++;
  end

  function automatic int rdpix(input int base, input int x, input int y);
    int w = int'(u_dram.mem[laddr(base, x, y)]);
    return (x & 1) ? (w & 255) : (w >> 8);
  endfunction
  function automatic int rdcpix(input int base, input int p, input int x, input int y);
    int w = int'(u_dram.mem[caddr(base, p, x, y)]);
    return (x & 1) ? (w & 255) : (w >> 8);
  endfunction

  initial begin
    int unsigned st, v;
    int maxe, sume, nchg, cyc;
    mvword_t mw;
    repeat (4) @(posedge clk); rst_n = 1; @(posedge clk);
    // reference picture and parameters through the PC port
    for (int y = 0; y < 176; y += 1) for (int x = 0; x < 192; x += 2)
      pc(0, laddr(REF, x, y), (refp(0, x, y) << 8) | refp(0, x + 1, y));
    for (int p = 1; p < 3; p++) for (int y = 0; y < 88; y++) for (int x = 0; x < 96; x += 2)
      pc(0, caddr(REF, p, x, y), (refp(p, x, y) << 8) | refp(p, x + 1, y));
    pc(0, QPW, QP);
    pc(0, DBH, DBQP | (2 << 5));
    $display("reference loaded");
    // program
    build();
    foreach (prog[k]) pc(2, k, 32'(prog[k]));
    // emulation mode: three instructions, then halt
    pc(3, 0, (3 << 16) | 1023);
    repeat (20) @(posedge clk);
    pc_read(4, 0, st);
    check("emulation stop halted", int'(st >> 26) & 1, 1);
    check("emulation stop pc", int'(st >> 16) & 1023, 1);
    $display("emulation checked");
    // full run with the camera capturing the current picture
    pc(3, 0, 1023);
    cyc = 0;
    fork
      camera_frame();
      begin
        @(posedge clk);
        while (!dut.halted) begin @(posedge clk); cyc++; end
      end
    join
    $display("program finished after %0d cycles, %0d instructions", cyc, dut.instr_count);
    check("camera overrun", int'(cam_overrun), 0);
    // interactive mode: read back the motion word of macroblock B and A
    pc_read(1, MVW, v);
    mw = mvword_t'(v[15:0]);
    check("MB B intra", int'(mw.intra), 1);
    check("pc read = dram", int'(v), int'(u_dram.mem[MVW]));
    // probe: AGU instruction counter
    pc_read(5, 1, v);
    check("probe instruction count", int'(v), int'(dut.instr_count));
    // reconstructed macroblocks against the captured ones
    for (int mbi = 0; mbi < 2; mbi++) begin
      int x0, y0;
      x0 = (mbi == 0) ? 32 : 80; y0 = (mbi == 0) ? 32 : 64;
      maxe = 0; sume = 0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        int e;
        if (mbi == 1 && y >= 6 && y < 10 && x < 4) continue;   // deblocked
        e = rdpix(REC, x0 + x, y0 + y) - curp(0, x0 + x, y0 + y);
        e = (e < 0) ? -e : e;
        if (e > maxe) maxe = e;
        sume += e;
      end
      for (int p = 1; p < 3; p++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        int e;
        e = rdcpix(REC, p, x0 / 2 + x, y0 / 2 + y) - curp(p, x0 / 2 + x, y0 / 2 + y);
        e = (e < 0) ? -e : e;
        if (e > maxe) maxe = e;
        sume += e;
      end
      $display("MB %0d reconstruction: max error %0d, total %0d", mbi, maxe, sume);
      checks++;
      if (maxe > 8 || sume > 384 * 3) begin failures++; $display("FAIL reconstruction MB %0d", mbi); end
    end
    // deblocking output
    nchg = 0;
    for (int wc = 0; wc < 2; wc++) for (int half = 0; half < 2; half++) begin
      int a, b, c, d, dd, ad, s, r, d1, d2, lim, x;
      x = 80 + 2 * wc + half;
      a = rdpix(REC, x, 70); b = rdpix(REC, x, 71); c = rdpix(REC, x, 72); d = rdpix(REC, x, 73);
      s = strength(DBQP);
      dd = tdiv(a - 4 * b + 4 * c - d, 8);
      ad = (dd < 0) ? -dd : dd;
      r = ad - ((2 * (ad - s) > 0) ? 2 * (ad - s) : 0); if (r < 0) r = 0;
      d1 = (dd < 0) ? -r : r;
      lim = tdiv(d1, 2); if (lim < 0) lim = -lim;
      d2 = tdiv(a - d, 4); if (d2 > lim) d2 = lim; if (d2 < -lim) d2 = -lim;
      for (int k = 0; k < 4; k++) begin
        int got, exp;
        got = int'(u_dram.mem[DBO + wc * 4 + k]);
        got = half ? (got & 255) : (got >> 8);
        exp = (k == 0) ? clip(a - d2) : (k == 1) ? clip(b + d1) : (k == 2) ? clip(c - d1) : clip(d + d2);
        check("deblock", got, exp);
        if (got != ((k == 0) ? a : (k == 1) ? b : (k == 2) ? c : d)) nchg++;
      end
    end
    // mechanisms
    $display("camera grants %0d, JSR %0d, DJNZ %0d, deblocked pixels changed %0d", n_gnt, n_jsr, n_djnz, nchg);
    checks++; if (n_gnt == 0) begin failures++; $display("FAIL camera never granted"); end
    checks++; if (n_jsr != 2) begin failures++; $display("FAIL subroutine calls"); end
    checks++; if (n_djnz == 0) begin failures++; $display("FAIL no loops"); end
    checks++; if (nchg == 0) begin failures++; $display("FAIL deblocking changed nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // macroblock A's motion word is overwritten by B's; capture it when written
  mvword_t mw_a;
  bit      mw_a_seen = 0;
  always @(posedge clk)
    if (mem_en && mem_we && mem_addr == 18'(MVW) && !mw_a_seen) begin
      mw_a = mvword_t'(mem_wdata); mw_a_seen = 1;
    end
  initial begin
    wait (mw_a_seen);
    @(posedge clk);
    check("MB A inter", int'(mw_a.intra), 0);
    check("MB A mvx (half pel)", int'(signed'(mw_a.mvx)), MVX);
    check("MB A mvy (half pel)", int'(signed'(mw_a.mvy)), MVY);
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
