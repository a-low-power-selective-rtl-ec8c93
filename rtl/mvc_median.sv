// mvc_median: median of N W-bit words by bit-serial majority voting.
// The search runs from MSB to LSB. At each bit position a majority_vote
// decides the median's bit (the median always lies in the majority group), and
// an lc_unit converts the remaining bits of every losing word into its losing
// bit, so it keeps counting as smaller (or larger) than the median further down.
// After W stages the majority bits form the median. No words are sorted and
// no magnitude comparators are used.
// The whole circuit is combinational, so the result follows the inputs within
// one clock period; the enclosing unit registers it.
// Default N=9 is the 3x3 window; the same module with N=41 is the
// forty-one-input sorting circuit of the power study.
module mvc_median #(
  parameter int unsigned N     = 9,
  parameter int unsigned W     = 8,
  parameter int unsigned LOGIC = 3
) (
  input  logic [W-1:0] data_i [N],
  output logic [W-1:0] median_o
);
  for (genvar s = 0; s < W; s++) begin : g_bit
    localparam int unsigned POS = W - 1 - s;
    logic [W-1:0] words [N];   // words entering the vote for bit POS
    logic [N-1:0] slice;

    if (s == 0) begin : g_first
      assign words = data_i;
    end else begin : g_next
      assign words = g_bit[s-1].g_lc.polar;
    end

    always_comb for (int unsigned j = 0; j < N; j++) slice[j] = words[j][POS];

    majority_vote #(.N(N), .LOGIC(LOGIC)) u_vote (.bits_i(slice), .maj_o(median_o[POS]));

    if (s < W - 1) begin : g_lc
      logic [W-1:0] polar [N];   // the same words after logic control
      lc_unit #(.N(N), .W(W), .POS(POS)) u_lc (
        .data_i  (words),
        .winner_i(median_o[POS]),
        .data_o  (polar)
      );
    end
  end
endmodule
