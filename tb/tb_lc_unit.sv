// tb_lc_unit: random words through lc_unit at bit position 5 of 8; words whose
// bit 5 differs from the winner must have bits 4..0 replaced by that bit, the
// rest must pass unchanged.
module tb_lc_unit;
  int checks = 0, failures = 0;
  logic [7:0] din [9], dout [9], exp;
  logic       win;

  lc_unit #(.N(9), .W(8), .POS(5)) dut (.data_i(din), .winner_i(win), .data_o(dout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < 9; j++) din[j] = 8'($urandom);
      win = 1'($urandom);
      #1;
      for (int j = 0; j < 9; j++) begin
        exp = din[j];
        if (din[j][5] != win) exp[4:0] = din[j][5] ? 5'b11111 : 5'b00000;
        checks++;
        if (dout[j] !== exp) begin
          failures++;
          $display("FAIL word %0d in %h win %0b got %h exp %h", j, din[j], win, dout[j], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
