// cpu_comparator: compares two W-bit operands of the 16-bit CPU as unsigned
// numbers and gives equal and greater-than flags. Combinational. The CPU
// latches the flags on a CMP instruction and branches on them (BEQ, BGT);
// the flags and the unsigned reading are this design's choices.
module cpu_comparator #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic         eq_o,
  output logic         gt_o
);
  assign eq_o = (a_i == b_i);
  assign gt_o = (a_i > b_i);
endmodule
