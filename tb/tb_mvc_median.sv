// tb_mvc_median: the majority-voting median against a sorting reference, for
// the 3x3 window (N=9, all three logic styles) and for the forty-one-input
// circuit (N=41). Random words, salt-and-pepper heavy words and many equal
// words are used. The circuit is combinational: the result is checked 1 time
// unit after the inputs change.
module tb_mvc_median;
  int checks = 0, failures = 0;

  logic [7:0] d9 [9], d41 [41];
  logic [7:0] m9_1, m9_2, m9_3, m41_2, m41_3;

  mvc_median #(.N(9),  .LOGIC(1)) u9_1 (.data_i(d9),  .median_o(m9_1));
  mvc_median #(.N(9),  .LOGIC(2)) u9_2 (.data_i(d9),  .median_o(m9_2));
  mvc_median                      u9_3 (.data_i(d9),  .median_o(m9_3));
  mvc_median #(.N(41), .LOGIC(2)) u41_2 (.data_i(d41), .median_o(m41_2));
  mvc_median #(.N(41), .LOGIC(3)) u41_3 (.data_i(d41), .median_o(m41_3));

  function automatic logic [7:0] ref_median(logic [7:0] v [$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  function automatic logic [7:0] pick(int mode);
    case (mode)
      0: return 8'($urandom);
      1: return ($urandom_range(2) == 0) ? 8'(($urandom_range(1)) * 255) : 8'(100 + $urandom_range(20));
      default: return 8'(8'h40 + $urandom_range(3));
    endcase
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q [$];
    logic [7:0] e;
    // worked example of the bit-serial search: median of five-like spread
    d9 = '{8'd125, 8'd49, 8'd38, 8'd81, 8'd102, 8'd0, 8'd255, 8'd90, 8'd7};
    #1 check("fixed N9", m9_3, 8'd81);
    for (int t = 0; t < 3000; t++) begin
      q = {};
      for (int j = 0; j < 9; j++) begin d9[j] = pick(t % 3); q.push_back(d9[j]); end
      #1;
      e = ref_median(q);
      check("N9 L1", m9_1, e);
      check("N9 L2", m9_2, e);
      check("N9 L3", m9_3, e);
    end
    for (int t = 0; t < 1000; t++) begin
      q = {};
      for (int j = 0; j < 41; j++) begin d41[j] = pick(t % 3); q.push_back(d41[j]); end
      #1;
      e = ref_median(q);
      check("N41 L2", m41_2, e);
      check("N41 L3", m41_3, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
