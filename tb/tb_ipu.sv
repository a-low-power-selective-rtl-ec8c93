// tb_ipu: fills the eleven window slots, pulses eval and checks the result
// and its latency: 1 cycle for clean and border pixels (centre passes
// through), 2 cycles for noisy pixels (median of the 3x3 slots).
module tb_ipu;
  import smf_pkg::*;
  int checks = 0, failures = 0;
  int n_noisy = 0, n_clean = 0, n_bypass = 0;

  logic clk = 0, rst = 1;
  logic mvc_rd = 0, eval = 0, bypass = 0;
  slot_t widx = '0;
  pixel_t wdata = '0;
  logic [DD_W-1:0] thr = DEFAULT_THRESHOLD;
  logic out_valid, out_noisy;
  pixel_t out_pixel;

  always #5 clk = ~clk;

  ipu dut (.clk(clk), .rst(rst), .mvc_rd_i(mvc_rd), .widx_i(widx), .wdata_i(wdata),
           .eval_i(eval), .bypass_i(bypass), .threshold_i(thr),
           .out_valid_o(out_valid), .out_pixel_o(out_pixel), .out_noisy_o(out_noisy));

  function automatic pixel_t ref_median(pixel_t v [$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  task automatic one(input pixel_t w [WIN_SLOTS], input logic byp);
    pixel_t q [$];
    int d, lat;
    logic exp_noisy;
    pixel_t exp_pix;
    for (int k = 0; k < WIN_SLOTS; k++) begin
      @(negedge clk); mvc_rd = 1; widx = slot_t'(k); wdata = w[k];
    end
    @(negedge clk); mvc_rd = 0; eval = 1; bypass = byp;
    @(negedge clk); eval = 0; bypass = 0;
    d = int'(w[CENTRE-1]) - 2 * int'(w[CENTRE]) + int'(w[CENTRE+1]);
    if (d < 0) d = -d;
    exp_noisy = !byp && (d >= int'(thr));
    for (int k = 0; k < 9; k++) q.push_back(w[k]);
    exp_pix = exp_noisy ? ref_median(q) : w[CENTRE];
    lat = 1;
    while (!out_valid && lat < 5) begin @(negedge clk); lat++; end
    checks += 3;
    if (!out_valid || out_pixel !== exp_pix || out_noisy !== exp_noisy) begin
      failures++;
      $display("FAIL valid %0b pixel %0d exp %0d noisy %0b exp %0b", out_valid, out_pixel, exp_pix, out_noisy, exp_noisy);
    end
    if (lat != (exp_noisy ? 2 : 1)) begin
      failures++;
      $display("FAIL latency %0d noisy %0b", lat, exp_noisy);
    end
    if (byp) n_bypass++; else if (exp_noisy) n_noisy++; else n_clean++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t w [WIN_SLOTS];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 600; t++) begin
      if (t < 2) begin
        // salt in the centre: median 60, or passed through at the border
        w = '{8'd10, 8'd20, 8'd30, 8'd40, 8'd255, 8'd60, 8'd70, 8'd80, 8'd90, 8'd35, 8'd65};
      end else begin
        for (int k = 0; k < WIN_SLOTS; k++) w[k] = 8'(100 + $urandom_range(30));
        if (t % 3 == 0) w[CENTRE] = ($urandom_range(1) == 1) ? 8'd255 : 8'd0;
      end
      one(w, (t == 1) || (t % 7 == 3));
      if (t == 0) begin
        checks++;
        if (out_pixel !== 8'd60) begin failures++; $display("FAIL spike median"); end
      end
    end
    checks++;
    if (n_noisy == 0 || n_clean == 0 || n_bypass == 0) begin
      failures++;
      $display("FAIL coverage noisy %0d clean %0d bypass %0d", n_noisy, n_clean, n_bypass);
    end
    $display("noisy %0d clean %0d bypass %0d", n_noisy, n_clean, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
