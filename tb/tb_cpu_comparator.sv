// tb_cpu_comparator: equal and greater-than flags for random, equal and
// off-by-one operand pairs, compared with integer comparison.
module tb_cpu_comparator;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic eq, gt;
  cpu_comparator dut (.a_i(a), .b_i(b), .eq_o(eq), .gt_o(gt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = 16'($urandom);
      case (t % 3)
        0: b = 16'($urandom);
        1: b = a;
        default: b = a + 16'($urandom_range(2)) - 16'd1;
      endcase
      #1;
      checks += 2;
      if (eq !== (int'(a) == int'(b))) begin failures++; $display("FAIL eq %h %h", a, b); end
      if (gt !== (int'(a) > int'(b)))  begin failures++; $display("FAIL gt %h %h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
