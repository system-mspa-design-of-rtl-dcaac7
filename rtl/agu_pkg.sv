// agu_pkg: instruction set of the address generation unit.
//
// 32-bit instruction: [31:27] opcode, [26:23] unit (module on the bus),
// [22:20] register a, [19:17] register b, [16:0] immediate.
// Registers R0..R7 are 18 bits wide (one DRAM word address).
//   Block read/write addressing:
//     RD    unit, ra, n     n words from DRAM[R[ra]...] to the module; R[ra] += n
//     WR    unit, ra, n     n result words of the module to DRAM[R[ra]...]; R[ra] += n
//     WIN   unit, ra, rb, f pixel window to the module, one pixel per word:
//                           frame base R[ra], origin R[rb] = {y[8:0], x[8:0]},
//                           f[3:0] = width-1, f[7:4] = height-1,
//                           f[9:8] = plane (0 Y, 1 Cb, 2 Cr),
//                           f[10] = add the integer part of the vector in R6
//     START unit            start pulse to the module
//     WAIT  unit            wait until the module is idle
//   Subroutine, branch and register control:
//     LDI ra, k  R[ra] = k       ADDI ra, k  R[ra] += k (k signed 17 bit)
//     ADD ra, rb R[ra] += R[rb]  LDM ra, rb  R[ra] = DRAM[R[rb]]
//     JMP k      JSR k   RET     DJNZ ra, k  R[ra] -= 1, jump to k if not 0
//   PC test:
//     SIG k      test register = k (read by the PC through the test bus)
//     HALT       stop and report to the PC
package agu_pkg;
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,  OP_START = 5'd1,  OP_WAIT = 5'd2,  OP_RD  = 5'd3,
    OP_WR   = 5'd4,  OP_WIN   = 5'd5,  OP_LDI  = 5'd6,  OP_ADDI = 5'd7,
    OP_ADD  = 5'd8,  OP_JMP   = 5'd9,  OP_JSR  = 5'd10, OP_RET = 5'd11,
    OP_DJNZ = 5'd12, OP_LDM   = 5'd13, OP_SIG  = 5'd14, OP_HALT = 5'd15
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [3:0]  unit;
    logic [2:0]  ra;
    logic [2:0]  rb;
    logic [16:0] imm;
  } instr_t;

  function automatic instr_t mk(input op_e op, input int unit, input int ra,
                                input int rb, input int imm);
    instr_t i;
    i.op = op; i.unit = 4'(unit); i.ra = 3'(ra); i.rb = 3'(rb); i.imm = 17'(imm);
    return i;
  endfunction
endpackage
