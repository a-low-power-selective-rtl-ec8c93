// cpu_alu: arithmetic and logic unit of the 16-bit CPU.
// Add, subtract, multiply (low W bits of the product, fixed-point integer),
// xor, and, or, on two W-bit operands. Combinational; unused operation codes
// give zero. The operation set follows the CPU's instruction list; the
// truncating multiply is this design's choice.
module cpu_alu
  import cpu_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  alu_op_t      op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] y_o
);
  logic [2*W-1:0] prod;
  assign prod = a_i * b_i;

  always_comb begin
    unique case (op_i)
      ALU_ADD: y_o = a_i + b_i;
      ALU_SUB: y_o = a_i - b_i;
      ALU_MUL: y_o = prod[W-1:0];
      ALU_XOR: y_o = a_i ^ b_i;
      ALU_AND: y_o = a_i & b_i;
      ALU_OR:  y_o = a_i | b_i;
      default: y_o = '0;
    endcase
  end

  logic unused_prod;
  assign unused_prod = ^prod[2*W-1:W];
endmodule
