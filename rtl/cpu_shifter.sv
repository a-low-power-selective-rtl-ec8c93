// cpu_shifter: one-bit logical shifter of the 16-bit CPU.
// left_i = 1 shifts left, 0 shifts right; the vacated bit is filled with 0.
// Combinational. Zero fill is this design's choice.
module cpu_shifter #(
  parameter int unsigned W = 16
) (
  input  logic         left_i,
  input  logic [W-1:0] a_i,
  output logic [W-1:0] y_o
);
  assign y_o = left_i ? {a_i[W-2:0], 1'b0} : {1'b0, a_i[W-1:1]};
endmodule
