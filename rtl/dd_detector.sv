// dd_detector: double-derivative (Laplacian) impulse detector.
// It looks at the five centre-row pixels x21..x25 of a 3x5 window whose centre
// x23 is the target pixel. First differences x'2j = x2j - x2(j+1) (signed),
// second differences x''2j = |x'2j - x'2(j+1)| = |x2j - 2 x2(j+1) + x2(j+2)|
// for j = 1..3. The middle one, centred on the target, is compared with the
// threshold: noisy_o = (x''22 >= threshold_i), and a noisy pixel is sent to the
// median filter. The other two second differences are brought out as well.
// The rule "x''22 >= t selects the median" and the threshold of 100 follow the
// filter's design; keeping the first differences signed (the plain discrete
// second derivative) is a deliberate reading, because with absolute first
// differences an isolated spike would score zero.
// Combinational.
module dd_detector #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   row_i [5],
  input  logic [W+1:0]   threshold_i,
  output logic [W+1:0]   dd_o [3],
  output logic           noisy_o
);
  logic signed [W+1:0] d1 [4];
  logic signed [W+1:0] d2;

  always_comb begin
    for (int unsigned j = 0; j < 4; j++)
      d1[j] = $signed({2'b00, row_i[j]}) - $signed({2'b00, row_i[j+1]});
    for (int unsigned j = 0; j < 3; j++) begin
      d2       = d1[j] - d1[j+1];
      dd_o[j]  = (d2 < 0) ? $unsigned(-d2) : $unsigned(d2);
    end
    noisy_o = (dd_o[1] >= threshold_i);
  end
endmodule
