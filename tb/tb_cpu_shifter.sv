// tb_cpu_shifter: one-bit left and right shifts of random words against
// multiplication and division by two.
module tb_cpu_shifter;
  int checks = 0, failures = 0;
  logic left;
  logic [15:0] a, y;
  cpu_shifter dut (.left_i(left), .a_i(a), .y_o(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = 16'($urandom); left = 1'(t % 2);
      #1;
      checks++;
      if (y !== (left ? 16'(a * 2) : 16'(a / 2))) begin failures++; $display("FAIL left %0b a %h y %h", left, a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
