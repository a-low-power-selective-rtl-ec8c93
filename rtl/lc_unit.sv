// lc_unit: logic control stage of the majority-voting median circuit.
// After the vote at bit position POS, every word whose bit POS differs from
// the winning bit is known to lie on the far side of the median. Its lower
// bits POS-1..0 are overwritten with its own (losing) bit, so the word keeps
// voting on the correct side at every later position. Words that agree with
// the winner pass unchanged. Bits above POS are never touched.
// Combinational; one instance per bit position except the LSB.
module lc_unit #(
  parameter int unsigned N   = 9,
  parameter int unsigned W   = 8,
  parameter int unsigned POS = 7
) (
  input  logic [W-1:0] data_i [N],
  input  logic         winner_i,
  output logic [W-1:0] data_o [N]
);
  initial assert (POS >= 1 && POS < W) else $error("lc_unit: POS must be 1..W-1");

  // Bits below POS.
  localparam logic [W-1:0] LOW = W'((1 << POS) - 1);

  // Gate-level form: lose = bit POS differs from the winner; the low bits of
  // a losing word are cleared and then filled with its bit POS.
  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      logic lose;
      lose      = data_i[j][POS] ^ winner_i;
      data_o[j] = (data_i[j] & ~({W{lose}} & LOW)) | ({W{lose & data_i[j][POS]}} & LOW);
    end
  end
endmodule
