// cpu_pkg: instruction encoding and control types of the 16-bit CPU.
// Instruction word (16 bits): opcode [15:11], an unused single-word field
// [10:6], source register [5:3], destination register [2:0]. Opcodes with bit
// 4 set are double-word instructions: the next word holds an address or an
// immediate. The field layout follows the CPU's instruction-format drawing;
// the opcode values are this design's own.
package cpu_pkg;
  localparam int unsigned XLEN = 16;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_ADD   = 5'd1,   // Rd <= Rd + Rs
    OP_SUB   = 5'd2,   // Rd <= Rd - Rs
    OP_MUL   = 5'd3,   // Rd <= low 16 bits of Rd * Rs
    OP_XOR   = 5'd4,
    OP_AND   = 5'd5,
    OP_OR    = 5'd6,
    OP_SHL   = 5'd7,   // Rd <= Rs << 1
    OP_SHR   = 5'd8,   // Rd <= Rs >> 1
    OP_CMP   = 5'd9,   // flags <= compare(Rd, Rs)
    OP_HALT  = 5'd15,
    OP_LOADI = 5'd16,  // Rd <= mem[word2]
    OP_MOVI  = 5'd17,  // Rd <= word2
    OP_BRA   = 5'd18,  // PC <= word2
    OP_BEQ   = 5'd19,  // PC <= word2 if last CMP found Rd == Rs
    OP_BGT   = 5'd20,  // PC <= word2 if last CMP found Rd >  Rs
    OP_STORE = 5'd21   // mem[word2] <= Rd
  } opcode_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_MUL = 3'd2,
    ALU_XOR = 3'd3,
    ALU_AND = 3'd4,
    ALU_OR  = 3'd5
  } alu_op_t;

  typedef struct packed {
    opcode_t    opcode;
    logic [4:0] single;   // unused field of single-word instructions
    logic [2:0] src;
    logic [2:0] dst;
  } instr_t;

  // Control lines driven by the control unit.
  typedef struct packed {
    logic addr_sel;   // load the address register (second instruction word)
    logic alu_sel;    // ALU result onto the data bus
    logic reg_sel;    // write the data bus into the register file
    logic instr_sel;  // load the instruction register
    logic comp_sel;   // update the comparator flags
  } ctrl_t;

  function automatic logic is_double(opcode_t op);
    return (op >= OP_LOADI);
  endfunction

  function automatic logic [15:0] enc1(opcode_t op, logic [2:0] src, logic [2:0] dst);
    return {op, 5'b0, src, dst};
  endfunction
endpackage
