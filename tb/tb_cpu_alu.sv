// tb_cpu_alu: random operands through every ALU operation, compared with
// the same operation done in 32-bit testbench arithmetic and truncated.
module tb_cpu_alu;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  alu_op_t op;
  logic [15:0] a, b, y;
  cpu_alu dut (.op_i(op), .a_i(a), .b_i(b), .y_o(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int t = 0; t < 3000; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (t % 10 == 0) a = 16'hFFFF;
      op = alu_op_t'(t % 6);
      #1;
      case (t % 6)
        0: e = int'(a) + int'(b);
        1: e = int'(a) - int'(b);
        2: e = int'({16'b0, a} * {16'b0, b});
        3: e = int'({16'b0, a ^ b});
        4: e = int'({16'b0, a & b});
        default: e = int'({16'b0, a | b});
      endcase
      checks++;
      if (y !== 16'(e)) begin failures++; $display("FAIL op %0d a %h b %h got %h exp %h", t % 6, a, b, y, 16'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
