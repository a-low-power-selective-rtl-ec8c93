// tb_cpu_prog_pkg: a test program for the 16-bit CPU and its expected
// results. It computes 5! in a MUL/SUB/CMP/BGT loop, stores and reloads
// memory, runs every logic and shift instruction, and takes a BEQ and a BRA
// that each skip a poisoning MOVI. Expected register values and the cycle
// count (memory answering one cycle after VMA) are worked out by hand below.
package tb_cpu_prog_pkg;
  import cpu_pkg::*;

  localparam int PROG_LEN = 36;
  localparam int DATA_ADDR = 41;
  localparam logic [15:0] DATA_WORD = 16'h00F0;
  // R0 = 5! = 120; R4 = 0xF0 ^ 0x78; R5 = (0xFF & 0xF0) | 1; R6 = R4 << 1;
  // R7 = R4 >> 1; R3 = 0 + R6
  localparam logic [15:0] EXP_REGS [8] = '{16'd120, 16'd0, 16'd1, 16'h0110,
                                           16'h0088, 16'h00F1, 16'h0110, 16'h0044};
  localparam int STORE_ADDR = 40;
  // cycles from reset release to halted: 4 MOVI (24) + 5 loops of
  // MUL, SUB, CMP (4 each) and BGT (6) = 90 + STORE 8 + LOADI 8 + MOVI 6 +
  // AND, OR, XOR, SHL, SHR, CMP (24) + BEQ 6 + ADD 4 + BRA 6 + NOP 4 + HALT 4
  localparam int EXP_CYCLES = 24 + 90 + 8 + 8 + 6 + 24 + 6 + 4 + 6 + 4 + 4;

  function automatic logic [15:0] w1(opcode_t op, int rs, int rd);
    return {op, 5'b0, 3'(rs), 3'(rd)};
  endfunction

  function automatic void load_program(ref logic [15:0] m [64]);
    for (int i = 0; i < 64; i++) m[i] = '0;
    m[0]  = w1(OP_MOVI, 0, 0);  m[1]  = 16'd1;
    m[2]  = w1(OP_MOVI, 0, 1);  m[3]  = 16'd5;
    m[4]  = w1(OP_MOVI, 0, 2);  m[5]  = 16'd1;
    m[6]  = w1(OP_MOVI, 0, 3);  m[7]  = 16'd0;
    m[8]  = w1(OP_MUL, 1, 0);
    m[9]  = w1(OP_SUB, 2, 1);
    m[10] = w1(OP_CMP, 3, 1);
    m[11] = w1(OP_BGT, 0, 0);   m[12] = 16'd8;
    m[13] = w1(OP_STORE, 0, 0); m[14] = 16'(STORE_ADDR);
    m[15] = w1(OP_LOADI, 0, 4); m[16] = 16'(DATA_ADDR);
    m[17] = w1(OP_MOVI, 0, 5);  m[18] = 16'h00FF;
    m[19] = w1(OP_AND, 4, 5);
    m[20] = w1(OP_OR, 2, 5);
    m[21] = w1(OP_XOR, 0, 4);
    m[22] = w1(OP_SHL, 4, 6);
    m[23] = w1(OP_SHR, 4, 7);
    m[24] = w1(OP_CMP, 6, 6);
    m[25] = w1(OP_BEQ, 0, 0);   m[26] = 16'd29;
    m[27] = w1(OP_MOVI, 0, 0);  m[28] = 16'hDEAD;
    m[29] = w1(OP_ADD, 6, 3);
    m[30] = w1(OP_BRA, 0, 0);   m[31] = 16'd34;
    m[32] = w1(OP_MOVI, 0, 1);  m[33] = 16'hBEEF;
    m[34] = w1(OP_NOP, 0, 0);
    m[35] = w1(OP_HALT, 0, 0);
    m[DATA_ADDR] = DATA_WORD;
  endfunction
endpackage
