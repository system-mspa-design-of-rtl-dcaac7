// codec_top: System-MSPA H.263 video encoder.
//
// Dedicated modules (motion estimation, prediction error, DCT-Q, IQ-IDCT,
// P frame reconstruction, deblocking filter, VLC, rate control) hang off one
// 16-bit data bus to the external 256K x 16 DRAM. None of them talks to
// another: each reads its input from DRAM and writes its output back, and
// the programmable address generation unit (agu) generates all DRAM
// addresses and the start/read/write strobes of the modules, so the schedule
// of a macroblock (and the two-stage ME / rest-of-loop pipeline) is a
// program, not wiring. The camera interface writes captured lines in the
// gaps between module accesses; the PC interface loads the AGU program,
// accesses DRAM while the AGU is halted and reads internal status over a
// test bus.
//
// Bus ownership: AGU halted -> PC interface; camera granted -> camera;
// otherwise AGU. The DRAM is outside (mem_* ports, read data one cycle after
// the request).
module codec_top
  import h263_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // external DRAM
  output logic        mem_en,
  output logic        mem_we,
  output addr_t       mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  // camera
  input  logic        cam_frame_start,
  input  logic        cam_line_start,
  input  logic        cam_pix_valid,
  input  pix_t        cam_pix,
  input  addr_t       cam_frame_base,
  output logic        cam_overrun,
  output logic        cam_frame_done,
  // PC interface
  input  logic        pc_cmd_valid,
  input  logic [2:0]  pc_cmd,
  input  logic [17:0] pc_addr,
  input  logic [31:0] pc_wdata,
  output logic        pc_cmd_ready,
  output logic        pc_rvalid,
  output logic [31:0] pc_rdata
);
  localparam int unsigned NMOD = 16;

  logic [NMOD-1:0] m_start, m_in_we, m_out_re, m_out_valid, m_busy, m_done;
  word_t           m_in_data;
  word_t           m_out_data [NMOD];

  // ---- AGU -----------------------------------------------------------------
  logic        prog_we, run, halted;
  logic [9:0]  prog_addr, run_pc, stop_pc, agu_pc;
  logic [31:0] prog_data, instr_count;
  logic [15:0] step_limit, sig;
  logic        a_en, a_we, cam_req, cam_gnt;
  addr_t       a_addr;
  word_t       a_wdata;

  agu #(.PROG_DEPTH(1024), .NMOD(NMOD)) u_agu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .run, .run_pc, .stop_pc,
    .step_limit, .halted, .pc(agu_pc), .sig, .instr_count,
    .mem_en(a_en), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .mem_rdata, .cam_req, .cam_gnt,
    .mod_start(m_start), .mod_in_we(m_in_we), .mod_in_data(m_in_data),
    .mod_out_re(m_out_re), .mod_out_valid(m_out_valid),
    .mod_out_data(m_out_data), .mod_busy(m_busy)
  );

  // ---- dedicated modules -------------------------------------------------------
  me u_me (
    .clk, .rst_n, .start(m_start[MOD_ME]), .in_we(m_in_we[MOD_ME]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_ME]),
    .out_re(m_out_re[MOD_ME]), .out_data(m_out_data[MOD_ME]),
    .busy(m_busy[MOD_ME]), .done(m_done[MOD_ME])
  );
  pred_err u_err (
    .clk, .rst_n, .start(m_start[MOD_ERR]), .in_we(m_in_we[MOD_ERR]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_ERR]),
    .out_re(m_out_re[MOD_ERR]), .out_data(m_out_data[MOD_ERR]),
    .busy(m_busy[MOD_ERR]), .done(m_done[MOD_ERR])
  );
  dctq u_dctq (
    .clk, .rst_n, .start(m_start[MOD_DCTQ]), .in_we(m_in_we[MOD_DCTQ]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_DCTQ]),
    .out_re(m_out_re[MOD_DCTQ]), .out_data(m_out_data[MOD_DCTQ]),
    .busy(m_busy[MOD_DCTQ]), .done(m_done[MOD_DCTQ])
  );
  iqidct u_iqidct (
    .clk, .rst_n, .start(m_start[MOD_IQIDCT]), .in_we(m_in_we[MOD_IQIDCT]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_IQIDCT]),
    .out_re(m_out_re[MOD_IQIDCT]), .out_data(m_out_data[MOD_IQIDCT]),
    .busy(m_busy[MOD_IQIDCT]), .done(m_done[MOD_IQIDCT])
  );
  precon u_precon (
    .clk, .rst_n, .start(m_start[MOD_PRECON]), .in_we(m_in_we[MOD_PRECON]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_PRECON]),
    .out_re(m_out_re[MOD_PRECON]), .out_data(m_out_data[MOD_PRECON]),
    .busy(m_busy[MOD_PRECON]), .done(m_done[MOD_PRECON])
  );
  deblock u_db (
    .clk, .rst_n, .start(m_start[MOD_DB]), .in_we(m_in_we[MOD_DB]),
    .in_data(m_in_data), .out_valid(m_out_valid[MOD_DB]),
    .out_re(m_out_re[MOD_DB]), .out_data(m_out_data[MOD_DB]),
    .busy(m_busy[MOD_DB]), .done(m_done[MOD_DB])
  );

  // unused bus slots
  for (genvar k = 0; k < NMOD; k++) begin : g_unused
    if (k == 0 || k > 6) begin : g_u
      assign m_out_valid[k] = 1'b0;
      assign m_out_data[k]  = '0;
      assign m_busy[k]      = 1'b0;
      assign m_done[k]      = 1'b0;
    end
  end

  // ---- camera interface -----------------------------------------------------
  logic  c_en, c_we;
  addr_t c_addr;
  word_t c_wdata;
  camera_if u_cam (
    .clk, .rst_n, .frame_start(cam_frame_start), .line_start(cam_line_start),
    .pix_valid(cam_pix_valid), .pix(cam_pix), .frame_base(cam_frame_base),
    .bus_req(cam_req), .bus_gnt(cam_gnt), .mem_en(c_en), .mem_we(c_we),
    .mem_addr(c_addr), .mem_wdata(c_wdata), .overrun(cam_overrun),
    .frame_done(cam_frame_done)
  );

  // ---- PC interface -------------------------------------------------------
  logic        p_en, p_we;
  addr_t       p_addr;
  word_t       p_wdata;
  logic [3:0]  probe_sel;
  logic [31:0] probe_data;
  pc_if u_pc (
    .clk, .rst_n, .cmd_valid(pc_cmd_valid), .cmd(pc_cmd), .addr(pc_addr),
    .wdata(pc_wdata), .cmd_ready(pc_cmd_ready), .rvalid(pc_rvalid),
    .rdata(pc_rdata), .agu_halted(halted), .agu_pc, .agu_sig(sig),
    .prog_we, .prog_addr, .prog_data, .run, .run_pc, .stop_pc, .step_limit,
    .mem_en(p_en), .mem_we(p_we), .mem_addr(p_addr), .mem_wdata(p_wdata),
    .mem_rdata, .probe_sel, .probe_data
  );

  // test bus: internal status words selectable by the PC
  logic [31:0] done_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done_cnt <= '0;
    else if (|m_done) done_cnt <= done_cnt + 32'd1;

  always_comb begin
    unique case (probe_sel)
      4'd0:    probe_data = {16'd0, m_busy};
      4'd1:    probe_data = instr_count;
      4'd2:    probe_data = done_cnt;
      default: probe_data = {22'd0, agu_pc};
    endcase
  end

  // ---- DRAM bus ownership ---------------------------------------------------
  always_comb begin
    if (halted) begin
      mem_en = p_en; mem_we = p_we; mem_addr = p_addr; mem_wdata = p_wdata;
    end else if (cam_gnt) begin
      mem_en = c_en; mem_we = c_we; mem_addr = c_addr; mem_wdata = c_wdata;
    end else begin
      mem_en = a_en; mem_we = a_we; mem_addr = a_addr; mem_wdata = a_wdata;
    end
  end
endmodule
