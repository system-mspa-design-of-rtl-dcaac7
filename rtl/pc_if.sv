// pc_if: PC test interface.
//
// A command port for an external PC. One command per 'cmd_valid' cycle:
//   CMD_MEM_WR  write 'wdata[15:0]' to DRAM word 'addr'
//   CMD_MEM_RD  read DRAM word 'addr'; 'rdata' valid with 'rvalid' two
//               cycles later
//   CMD_PROG    write AGU program word 'addr' with 'wdata'
//   CMD_RUN     start the AGU at addr[9:0], stop at wdata[9:0], after at most
//               wdata[31:16] instructions (0 = no limit): emulation mode
//   CMD_STATUS  rdata = {halted, pc, sig} next cycle
//   CMD_PROBE   rdata = test bus word 'addr[3:0]' (internal status of the
//               modules: busy bits, AGU instruction count, ...) next cycle
// DRAM access is only granted while the AGU is halted (interactive mode);
// 'cmd_ready' is low otherwise for memory commands.
module pc_if
  import h263_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [2:0]  cmd,
  input  logic [17:0] addr,
  input  logic [31:0] wdata,
  output logic        cmd_ready,
  output logic        rvalid,
  output logic [31:0] rdata,
  // AGU control
  input  logic        agu_halted,
  input  logic [9:0]  agu_pc,
  input  logic [15:0] agu_sig,
  output logic        prog_we,
  output logic [9:0]  prog_addr,
  output logic [31:0] prog_data,
  output logic        run,
  output logic [9:0]  run_pc,
  output logic [9:0]  stop_pc,
  output logic [15:0] step_limit,
  // DRAM port (used while the AGU is halted)
  output logic        mem_en,
  output logic        mem_we,
  output addr_t       mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  // test bus
  output logic [3:0]  probe_sel,
  input  logic [31:0] probe_data
);
  localparam logic [2:0] CMD_MEM_WR = 3'd0, CMD_MEM_RD = 3'd1, CMD_PROG = 3'd2,
                         CMD_RUN = 3'd3, CMD_STATUS = 3'd4, CMD_PROBE = 3'd5;

  logic mem_cmd, rd_p1, rd_p2;
  assign mem_cmd   = (cmd == CMD_MEM_WR) || (cmd == CMD_MEM_RD);
  assign cmd_ready = !mem_cmd || agu_halted;

  always_comb begin
    mem_en    = cmd_valid && mem_cmd && agu_halted;
    mem_we    = mem_en && (cmd == CMD_MEM_WR);
    mem_addr  = addr;
    mem_wdata = wdata[15:0];
    prog_we   = cmd_valid && (cmd == CMD_PROG);
    prog_addr = addr[9:0];
    prog_data = wdata;
    probe_sel = addr[3:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; run_pc <= '0; stop_pc <= '1; step_limit <= '0;
      rd_p1 <= 1'b0; rd_p2 <= 1'b0; rvalid <= 1'b0; rdata <= '0;
    end else begin
      run    <= cmd_valid && (cmd == CMD_RUN);
      if (cmd_valid && cmd == CMD_RUN) begin
        run_pc <= addr[9:0]; stop_pc <= wdata[9:0]; step_limit <= wdata[31:16];
      end
      rd_p1  <= mem_en && !mem_we;
      rd_p2  <= rd_p1;
      rvalid <= 1'b0;
      if (rd_p1) begin rvalid <= 1'b1; rdata <= {16'd0, mem_rdata}; end
      else if (cmd_valid && cmd == CMD_STATUS) begin
        rvalid <= 1'b1; rdata <= {5'd0, agu_halted, agu_pc, agu_sig};
      end else if (cmd_valid && cmd == CMD_PROBE) begin
        rvalid <= 1'b1; rdata <= probe_data;
      end
    end
  end
  logic unused;
  assign unused = ^{rd_p2, wdata[15:10]};
endmodule
