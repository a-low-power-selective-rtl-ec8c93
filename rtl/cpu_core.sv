// cpu_core: a small multi-cycle 16-bit processor.
// The control unit is a finite-state machine that sequences each instruction:
//   FETCH   read the word at PC into the instruction register (InstrSel), PC+1
//   DECODE  single-word instructions go to EXECUTE, double-word ones to FETCH2
//   FETCH2  read the second word into the address register (AddrSel), PC+1
//   EXECUTE ALU, shift, compare (CompSel), move, branch; loads/stores go on
//   MEMORY  read or write mem[address register]
// Register writes (RegSel) take the internal 16-bit data bus, which carries the
// ALU result (AluSel), the shifter output, the address register or memory data.
// Memory is reached through the VMA / Ready / Addr / Data interface: vma_o is
// held with addr_o, rw_o and wdata_o until ready_i. HALT stops the machine.
// Single-word instructions take 4 cycles (3 for HALT), MOVI/branches 6,
// LOADI/STORE 8, with a memory that answers one cycle after VMA.
// The unit list, control-line names, instruction formats and the ADD, SUB, MUL,
// XOR, AND, OR, LOADI, MOVI and BRA instructions follow the CPU's description;
// the state sequence, opcode values and the NOP, SHL, SHR, CMP, BEQ, BGT,
// STORE and HALT instructions are this design's own. Synchronous active-high
// reset starts execution at address 0.
module cpu_core
  import cpu_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  output logic          vma_o,
  output logic          rw_o,
  output logic [AW-1:0] addr_o,
  output logic [W-1:0]  wdata_o,
  input  logic [W-1:0]  rdata_i,
  input  logic          ready_i,
  output logic          halted_o,
  output logic [AW-1:0] pc_o
);
  typedef enum logic [2:0] {S_FETCH, S_DECODE, S_FETCH2, S_EXEC, S_MEM, S_HALT} state_t;
  state_t state;

  instr_t        ir;        // instruction register
  logic [W-1:0]  ar;        // address register (second instruction word)
  logic [AW-1:0] pc;        // program counter
  logic          flag_eq, flag_gt;
  ctrl_t         ctrl;

  logic [W-1:0]  rd_val, rs_val, alu_y, sh_y, dbus;
  logic          cmp_eq, cmp_gt;
  alu_op_t       alu_op;
  opcode_t       op;

  assign op = ir.opcode;

  cpu_regfile #(.NREGS(8), .W(W)) u_rf (
    .clk      (clk),
    .rst      (rst),
    .we_i     (ctrl.reg_sel),
    .waddr_i  (ir.dst),
    .wdata_i  (dbus),
    .raddr_a_i(ir.dst),
    .raddr_b_i(ir.src),
    .rdata_a_o(rd_val),
    .rdata_b_o(rs_val)
  );

  always_comb begin
    unique case (op)
      OP_SUB:  alu_op = ALU_SUB;
      OP_MUL:  alu_op = ALU_MUL;
      OP_XOR:  alu_op = ALU_XOR;
      OP_AND:  alu_op = ALU_AND;
      OP_OR:   alu_op = ALU_OR;
      default: alu_op = ALU_ADD;
    endcase
  end

  cpu_alu        #(.W(W)) u_alu (.op_i(alu_op), .a_i(rd_val), .b_i(rs_val), .y_o(alu_y));
  cpu_shifter    #(.W(W)) u_sh  (.left_i(op == OP_SHL), .a_i(rs_val), .y_o(sh_y));
  cpu_comparator #(.W(W)) u_cmp (.a_i(rd_val), .b_i(rs_val), .eq_o(cmp_eq), .gt_o(cmp_gt));

  // Control unit: control lines from state and opcode.
  always_comb begin
    ctrl = '0;
    unique case (state)
      S_FETCH:  ctrl.instr_sel = ready_i;
      S_FETCH2: ctrl.addr_sel  = ready_i;
      S_EXEC: begin
        unique case (op)
          OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_AND, OP_OR: begin
            ctrl.alu_sel = 1'b1;
            ctrl.reg_sel = 1'b1;
          end
          OP_SHL, OP_SHR, OP_MOVI: ctrl.reg_sel  = 1'b1;
          OP_CMP:                  ctrl.comp_sel = 1'b1;
          default: ;
        endcase
      end
      S_MEM: ctrl.reg_sel = ready_i && (op == OP_LOADI);
      default: ;
    endcase
  end

  // Internal data bus into the register file.
  always_comb begin
    if (ctrl.alu_sel)                   dbus = alu_y;
    else if (op == OP_SHL || op == OP_SHR) dbus = sh_y;
    else if (op == OP_MOVI)             dbus = ar;
    else                                dbus = rdata_i;
  end

  // Memory interface.
  always_comb begin
    vma_o   = 1'b0;
    rw_o    = 1'b0;
    addr_o  = pc;
    wdata_o = rd_val;
    unique case (state)
      S_FETCH, S_FETCH2: vma_o = 1'b1;
      S_MEM: begin
        vma_o  = 1'b1;
        rw_o   = (op == OP_STORE);
        addr_o = ar[AW-1:0];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_FETCH;
      pc      <= '0;
      ir      <= '0;
      ar      <= '0;
      flag_eq <= 1'b0;
      flag_gt <= 1'b0;
    end else begin
      if (ctrl.instr_sel) ir <= instr_t'(rdata_i);
      if (ctrl.addr_sel)  ar <= rdata_i;
      if (ctrl.comp_sel) begin
        flag_eq <= cmp_eq;
        flag_gt <= cmp_gt;
      end
      unique case (state)
        S_FETCH: if (ready_i) begin
          pc    <= pc + 1'b1;
          state <= S_DECODE;
        end
        S_DECODE: state <= is_double(op) ? S_FETCH2 : S_EXEC;
        S_FETCH2: if (ready_i) begin
          pc    <= pc + 1'b1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          state <= S_FETCH;
          unique case (op)
            OP_BRA:            pc    <= ar[AW-1:0];
            OP_BEQ:            if (flag_eq) pc <= ar[AW-1:0];
            OP_BGT:            if (flag_gt) pc <= ar[AW-1:0];
            OP_LOADI, OP_STORE: state <= S_MEM;
            OP_HALT:           state <= S_HALT;
            default: ;
          endcase
        end
        S_MEM:  if (ready_i) state <= S_FETCH;
        S_HALT: state <= S_HALT;
        default: state <= S_HALT;
      endcase
    end
  end

  assign halted_o = (state == S_HALT);
  assign pc_o     = pc;

  // Bus rule: a request stays steady until the memory answers.
  assert property (@(posedge clk) disable iff (rst)
                   vma_o && !ready_i |=> vma_o && $stable(addr_o) && $stable(rw_o))
    else $error("cpu_core: memory request changed before ready");

  logic unused_ar;
  assign unused_ar = ^{ar[W-1:AW], ir.single};
endmodule
