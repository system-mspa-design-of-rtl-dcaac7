// agu: address generation unit, the programmable controller of the codec.
//
// The AGU runs a program of agu_pkg instructions from its program memory.
// It is the only bus master of the external DRAM during normal operation:
// block read instructions fetch words (RD: linear, WIN: a pixel window in the
// hierarchical frame layout) and strobe them into one dedicated module; block
// write instructions (WR) take a module's result words and store them. Every
// module therefore sees only data and strobes, never addresses. START/WAIT
// sequence the modules; LDI/ADDI/ADD/LDM/DJNZ/JMP/JSR/RET build the
// repetitive macroblock loops; SIG and HALT serve the PC test interface.
//
// Frame layout: a frame occupies 12 x 11 macroblock slots of 192 words; a
// slot holds Y0..Y3, Cb, Cr, each an 8x8 block of 32 words (4 per line, two
// pixels per word, left pixel in bits 15:8). Window reads clamp coordinates
// to the 192 x 176 (luminance) or 96 x 88 (chrominance) slot area.
//
// DRAM port: one access per cycle; read data returns one cycle after the
// request. Between two instructions the camera interface may take the bus
// ('cam_req' / 'cam_gnt') to write a captured line. The PC can load the
// program, start it at 'run_pc', and stop it at 'stop_pc' or after
// 'step_limit' instructions (0 = unlimited): the emulation mode.
module agu
  import h263_pkg::*;
  import agu_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned NMOD       = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load and run control (PC interface)
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  logic [31:0]                   prog_data,
  input  logic                          run,
  input  logic [$clog2(PROG_DEPTH)-1:0] run_pc,
  input  logic [$clog2(PROG_DEPTH)-1:0] stop_pc,
  input  logic [15:0]                   step_limit,
  output logic                          halted,
  output logic [$clog2(PROG_DEPTH)-1:0] pc,
  output logic [15:0]                   sig,
  output logic [31:0]                   instr_count,
  // DRAM master port
  output logic                          mem_en,
  output logic                          mem_we,
  output addr_t                         mem_addr,
  output word_t                         mem_wdata,
  input  word_t                         mem_rdata,
  // camera arbitration
  input  logic                          cam_req,
  output logic                          cam_gnt,
  // dedicated modules
  output logic [NMOD-1:0]               mod_start,
  output logic [NMOD-1:0]               mod_in_we,
  output word_t                         mod_in_data,
  output logic [NMOD-1:0]               mod_out_re,
  input  logic [NMOD-1:0]               mod_out_valid,
  input  word_t                         mod_out_data [NMOD],
  input  logic [NMOD-1:0]               mod_busy
);
  localparam int unsigned PW = $clog2(PROG_DEPTH);

  instr_t prog [PROG_DEPTH];
  always_ff @(posedge clk) if (prog_we) prog[prog_addr] <= instr_t'(prog_data);

  typedef enum logic [3:0] {
    S_HALT, S_FETCH, S_EXEC, S_RD, S_WR, S_WIN, S_LDM, S_WAIT, S_CAM, S_DRAIN
  } state_e;
  state_e state;

  instr_t ir;
  logic [17:0] r [8];
  logic [PW-1:0] stack [4];
  logic [1:0]  sp;
  logic [16:0] n, i;               // transfer length and count
  logic [3:0]  wx, wy;
  logic [15:0] steps;
  logic        rd_pend;            // a read issued last cycle
  logic        rd_byte;            // WIN: pixel in the low byte
  logic        rd_win;
  logic        rd_ldm;
  logic [3:0]  rd_unit;
  logic [2:0]  rd_reg;

  // ---- window address -------------------------------------------------------
  logic signed [10:0] px, py, mvxi, mvyi;
  logic [9:0] cx, cy;
  addr_t      win_addr;
  always_comb begin
    logic [1:0] plane;
    logic signed [6:0] vx, vy;
    logic [7:0] mb;
    plane = ir.imm[9:8];
    vx = signed'(r[6][14:8]);
    vy = signed'(r[6][7:1]);
    if (plane != 2'd0) begin vx = chroma_mv(vx); vy = chroma_mv(vy); end
    mvxi = ir.imm[10] ? 11'(vx >>> 1) : 11'sd0;
    mvyi = ir.imm[10] ? 11'(vy >>> 1) : 11'sd0;
    px = 11'(signed'({2'b0, r[ir.rb][8:0]})) + mvxi + 11'(wx);
    py = 11'(signed'({2'b0, r[ir.rb][17:9]})) + mvyi + 11'(wy);
    if (px < 0) px = 0;
    if (py < 0) py = 0;
    if (plane == 2'd0) begin
      if (px > 11'sd191) px = 11'sd191;
      if (py > 11'sd175) py = 11'sd175;
      cx = 10'(px); cy = 10'(py);
      mb = 8'(cy[7:4] * 8'd12 + 8'(cx[7:4]));
      win_addr = 18'(r[ir.ra]) + 18'(mb) * 18'd192 + 18'({cy[3], cx[3]}) * 18'd32
               + 18'(cy[2:0]) * 18'd4 + 18'(cx[2:1]);
    end else begin
      if (px > 11'sd95) px = 11'sd95;
      if (py > 11'sd87) py = 11'sd87;
      cx = 10'(px); cy = 10'(py);
      mb = 8'(cy[6:3] * 8'd12 + 8'(cx[6:3]));
      win_addr = 18'(r[ir.ra]) + 18'(mb) * 18'd192 + (18'd3 + 18'(plane)) * 18'd32
               + 18'(cy[2:0]) * 18'd4 + 18'(cx[2:1]);
    end
  end

  // ---- bus outputs ---------------------------------------------------------
  always_comb begin
    mem_en = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0;
    mod_start = '0; mod_out_re = '0;
    cam_gnt = (state == S_CAM);
    unique case (state)
      S_EXEC: if (ir.op == OP_START) mod_start[ir.unit] = 1'b1;
      S_RD:   if (i < n) begin mem_en = 1'b1; mem_addr = r[ir.ra] + 18'(i); end
      S_WIN:  begin mem_en = 1'b1; mem_addr = win_addr; end
      S_LDM:  if (!rd_pend) begin mem_en = 1'b1; mem_addr = r[ir.rb]; end
      S_WR:   if (mod_out_valid[ir.unit]) begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = r[ir.ra] + 18'(i);
        mem_wdata = mod_out_data[ir.unit];
        mod_out_re[ir.unit] = 1'b1;
      end
      default: ;
    endcase
  end

  // read data return path (one cycle latency)
  always_comb begin
    mod_in_we   = '0;
    mod_in_data = rd_byte ? {8'h00, (rd_win ? mem_rdata[7:0] : mem_rdata[15:8])} : mem_rdata;
    if (rd_pend && !rd_ldm) mod_in_we[rd_unit] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HALT; pc <= '0; ir <= '0; sp <= '0; n <= '0; i <= '0;
      wx <= '0; wy <= '0; steps <= '0; sig <= '0; instr_count <= '0;
      rd_pend <= 1'b0; rd_byte <= 1'b0; rd_win <= 1'b0; rd_ldm <= 1'b0;
      rd_unit <= '0; rd_reg <= '0;
      for (int k = 0; k < 8; k++) r[k] <= '0;
      for (int k = 0; k < 4; k++) stack[k] <= '0;
    end else begin
      rd_pend <= 1'b0;
      if (rd_pend && rd_ldm) r[rd_reg] <= 18'(mem_rdata);
      unique case (state)
        S_HALT: if (run) begin state <= S_FETCH; pc <= run_pc; steps <= '0; end
        S_FETCH: begin
          if (cam_req) state <= S_CAM;
          else if (pc == stop_pc || (step_limit != 0 && steps == step_limit))
            state <= S_HALT;
          else begin
            ir <= prog[pc]; pc <= pc + 1'b1; steps <= steps + 16'd1;
            instr_count <= instr_count + 32'd1;
            state <= S_EXEC;
          end
        end
        S_CAM: if (!cam_req) state <= S_FETCH;
        S_EXEC: begin
          state <= S_FETCH;
          i <= '0; n <= ir.imm; wx <= '0; wy <= '0;
          unique case (ir.op)
            OP_RD:   if (ir.imm != 0) state <= S_RD;
            OP_WR:   if (ir.imm != 0) state <= S_WR;
            OP_WIN:  state <= S_WIN;
            OP_LDM:  state <= S_LDM;
            OP_WAIT: state <= S_WAIT;
            OP_LDI:  r[ir.ra] <= 18'(ir.imm);
            OP_ADDI: r[ir.ra] <= r[ir.ra] + 18'(signed'(ir.imm));
            OP_ADD:  r[ir.ra] <= r[ir.ra] + r[ir.rb];
            OP_JMP:  pc <= PW'(ir.imm);
            OP_JSR:  begin stack[sp] <= pc; sp <= sp + 2'd1; pc <= PW'(ir.imm); end
            OP_RET:  begin pc <= stack[sp - 2'd1]; sp <= sp - 2'd1; end
            OP_DJNZ: begin
              r[ir.ra] <= r[ir.ra] - 18'd1;
              if (r[ir.ra] != 18'd1) pc <= PW'(ir.imm);
            end
            OP_SIG:  sig <= ir.imm[15:0];
            OP_HALT: state <= S_HALT;
            default: ;
          endcase
        end
        S_RD: begin
          if (i < n) begin
            rd_pend <= 1'b1; rd_byte <= 1'b0; rd_ldm <= 1'b0; rd_unit <= ir.unit;
            i <= i + 17'd1;
          end
          if (i == n - 17'd1) begin
            r[ir.ra] <= r[ir.ra] + 18'(n);
            state <= S_DRAIN;
          end
        end
        S_WIN: begin
          rd_pend <= 1'b1; rd_byte <= 1'b1; rd_win <= cx[0]; rd_ldm <= 1'b0;
          rd_unit <= ir.unit;
          if (wx == ir.imm[3:0]) begin
            wx <= '0;
            wy <= wy + 4'd1;
            if (wy == ir.imm[7:4]) state <= S_DRAIN;
          end else wx <= wx + 4'd1;
        end
        S_LDM: if (!rd_pend) begin
          rd_pend <= 1'b1; rd_ldm <= 1'b1; rd_reg <= ir.ra; state <= S_DRAIN;
        end
        S_WR: if (mod_out_valid[ir.unit]) begin
          i <= i + 17'd1;
          if (i == n - 17'd1) begin
            r[ir.ra] <= r[ir.ra] + 18'(n);
            state <= S_FETCH;
          end
        end
        S_WAIT: if (!mod_busy[ir.unit] || mod_out_valid[ir.unit]) state <= S_FETCH;
        S_DRAIN: state <= S_FETCH;   // last read data returns this cycle
        default: state <= S_HALT;
      endcase
    end
  end

  assign halted = (state == S_HALT);
endmodule
