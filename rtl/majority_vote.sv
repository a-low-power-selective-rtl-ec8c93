// majority_vote: majority bit of N input bits (N odd).
// This is the decision element of the majority-voting median circuit: at one
// bit position it tells which value, 0 or 1, the majority of the words carry.
// Three logic styles, chosen by LOGIC, give the same function with different
// gate structures (and so different switching activity):
//   LOGIC=1  count the ones and the zeros separately, output count1 > count0
//   LOGIC=2  sum the bits, output sum > N/2
//   LOGIC=3  an AND-OR threshold network with no adder: "at least k of the
//            first i bits" is (bit i AND at least k-1 of the first i-1) OR
//            (at least k of the first i-1). For N=3 this reduces to
//            x1x2 + x2x3 + x1x3.
// The three styles are the ones the filter's design study compares; the
// generalisation of the AND-OR form to N inputs is this design's own.
// Purely combinational.
module majority_vote #(
  parameter int unsigned N     = 9,
  parameter int unsigned LOGIC = 3
) (
  input  logic [N-1:0] bits_i,
  output logic         maj_o
);
  localparam int unsigned K  = (N + 1) / 2;   // votes needed to win
  localparam int unsigned CW = $clog2(N + 1);

  initial begin
    assert (N % 2 == 1) else $error("majority_vote: N must be odd");
    assert (LOGIC >= 1 && LOGIC <= 3) else $error("majority_vote: LOGIC must be 1, 2 or 3");
  end

  if (LOGIC == 1) begin : g_logic1
    logic [CW-1:0] count1, count0;
    always_comb begin
      count1 = '0;
      for (int unsigned i = 0; i < N; i++) count1 += CW'(bits_i[i]);
      count0 = CW'(N) - count1;
      maj_o  = (count1 > count0);
    end
  end else if (LOGIC == 2) begin : g_logic2
    logic [CW-1:0] sum;
    always_comb begin
      sum = '0;
      for (int unsigned i = 0; i < N; i++) sum += CW'(bits_i[i]);
      maj_o = (sum > CW'(N / 2));
    end
  end else begin : g_logic3
    // atl[i][k]: at least k ones among bits_i[i-1:0]; atl[i][0] is always 1.
    logic [K:0] atl [N+1];
    always_comb begin
      atl[0]    = '0;
      atl[0][0] = 1'b1;
      for (int unsigned i = 1; i <= N; i++) begin
        atl[i][0] = 1'b1;
        for (int unsigned k = 1; k <= K; k++)
          atl[i][k] = (bits_i[i-1] & atl[i-1][k-1]) | atl[i-1][k];
      end
      maj_o = atl[N][K];
    end
  end
endmodule
