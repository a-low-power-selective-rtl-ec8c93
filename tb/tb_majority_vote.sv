// tb_majority_vote: checks all three logic styles of majority_vote against a
// popcount reference: exhaustively for 3 and 9 inputs, with random vectors for
// 41 inputs (Logic 3 included, as the AND-OR network is built for any N).
module tb_majority_vote;
  int checks = 0, failures = 0;

  logic [2:0]  b3;
  logic [8:0]  b9;
  logic [40:0] b41;
  logic m3_3, m9_1, m9_2, m9_3, m41_1, m41_2, m41_3;

  majority_vote #(.N(3),  .LOGIC(3)) u3_3  (.bits_i(b3),  .maj_o(m3_3));
  majority_vote #(.N(9),  .LOGIC(1)) u9_1  (.bits_i(b9),  .maj_o(m9_1));
  majority_vote #(.N(9),  .LOGIC(2)) u9_2  (.bits_i(b9),  .maj_o(m9_2));
  majority_vote                      u9_3  (.bits_i(b9),  .maj_o(m9_3));
  majority_vote #(.N(41), .LOGIC(1)) u41_1 (.bits_i(b41), .maj_o(m41_1));
  majority_vote #(.N(41), .LOGIC(2)) u41_2 (.bits_i(b41), .maj_o(m41_2));
  majority_vote #(.N(41), .LOGIC(3)) u41_3 (.bits_i(b41), .maj_o(m41_3));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      b3 = 3'(v); #1;
      check("N3 L3", m3_3, $countones(b3) >= 2);
    end
    for (int v = 0; v < 512; v++) begin
      b9 = 9'(v); #1;
      check("N9 L1", m9_1, $countones(b9) >= 5);
      check("N9 L2", m9_2, $countones(b9) >= 5);
      check("N9 L3", m9_3, $countones(b9) >= 5);
    end
    for (int t = 0; t < 3000; t++) begin
      // bias towards counts near the threshold of 21
      b41 = '0;
      for (int i = 0; i < 41; i++) b41[i] = ($urandom_range(99) < 40 + (t % 21));
      #1;
      check("N41 L1", m41_1, $countones(b41) >= 21);
      check("N41 L2", m41_2, $countones(b41) >= 21);
      check("N41 L3", m41_3, $countones(b41) >= 21);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
