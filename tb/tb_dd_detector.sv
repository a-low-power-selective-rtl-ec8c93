// tb_dd_detector: second differences |x(j) - 2x(j+1) + x(j+2)| of a five-pixel
// row and the threshold decision on the centre one, against integer
// arithmetic. Includes an isolated spike (must be flagged at t=100) and a
// flat row (must not be).
module tb_dd_detector;
  import smf_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0]  row [5];
  logic [9:0]  thr;
  logic [9:0]  dd [3];
  logic        noisy;

  dd_detector dut (.row_i(row), .threshold_i(thr), .dd_o(dd), .noisy_o(noisy));

  task automatic run_check();
    int e;
    #1;
    for (int j = 0; j < 3; j++) begin
      e = int'(row[j]) - 2 * int'(row[j+1]) + int'(row[j+2]);
      if (e < 0) e = -e;
      checks++;
      if (int'(dd[j]) != e) begin
        failures++;
        $display("FAIL dd[%0d] got %0d exp %0d", j, dd[j], e);
      end
      if (j == 1) begin
        checks++;
        if (noisy !== (e >= int'(thr))) begin
          failures++;
          $display("FAIL noisy got %0b for dd %0d thr %0d", noisy, e, thr);
        end
      end
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
    thr = DEFAULT_THRESHOLD;
    row = '{8'd50, 8'd52, 8'd255, 8'd51, 8'd49};   // salt spike
    run_check();
    checks++; if (!noisy) begin failures++; $display("FAIL spike not flagged"); end
    row = '{8'd200, 8'd200, 8'd0, 8'd201, 8'd199};  // pepper spike
    run_check();
    checks++; if (!noisy) begin failures++; $display("FAIL pepper not flagged"); end
    row = '{8'd90, 8'd91, 8'd92, 8'd93, 8'd94};     // smooth ramp
    run_check();
    checks++; if (noisy) begin failures++; $display("FAIL ramp flagged"); end
    row = '{8'd0, 8'd255, 8'd0, 8'd255, 8'd0};      // extreme: |0-510+0| = 510
    run_check();
    for (int t = 0; t < 5000; t++) begin
      for (int j = 0; j < 5; j++) row[j] = 8'($urandom);
      thr = (t % 2 == 0) ? DEFAULT_THRESHOLD : 10'($urandom_range(511));
      run_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
