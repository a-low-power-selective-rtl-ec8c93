// tb_workload_250: the filter at the image size of its evaluation, 250 x 250
// pixels, with 10% and then 50% salt-and-pepper noise on a synthetic test
// image (smooth shading, a bright disc and a vertical edge). The image
// processor is built with ROWS = COLS = 250 (its default RAM holds 30 x 30).
// Every output pixel is checked against a model of the filter, and the scan's
// cycle count against 5 / 15 / 16 cycles per border / clean / noisy pixel.
// It also reports how many noise pixels the filter restored to a value
// within 20 grey levels of the clean image, for information only.
module tb_workload_250;
  import smf_pkg::*;
  localparam int ROWS = 250, COLS = 250;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, we = 0, start = 0;
  logic [15:0] waddr = '0;
  pixel_t wdata = '0;
  logic [DD_W-1:0] thr = DEFAULT_THRESHOLD;
  logic out_valid, out_noisy, busy, done;
  pixel_t out_pixel;
  logic [7:0] out_row, out_col;
  always #5 clk = ~clk;

  image_processor #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst), .load_we_i(we), .load_addr_i(waddr), .load_data_i(wdata),
    .start_i(start), .threshold_i(thr), .out_valid_o(out_valid), .out_pixel_o(out_pixel),
    .out_row_o(out_row), .out_col_o(out_col), .out_noisy_o(out_noisy), .busy_o(busy), .done_o(done));

  pixel_t clean [ROWS][COLS];
  pixel_t img   [ROWS][COLS];

  function automatic pixel_t ref_median(pixel_t v [$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int percent);
    int p, d, cycles, exp_cycles, n_noise, n_fixed, n_med, bad;
    logic border, noisy;
    pixel_t exp_pix;
    pixel_t q [$];
    n_noise = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = clean[r][c];
        if ($urandom_range(99) < percent) begin
          img[r][c] = ($urandom_range(1) == 1) ? 8'd255 : 8'd0;
          n_noise++;
        end
      end
    for (int a = 0; a < ROWS * COLS; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = img[a / COLS][a % COLS];
    end
    @(negedge clk); we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1; exp_cycles = 0; p = 0; n_fixed = 0; n_med = 0; bad = 0;
    while (p < ROWS * COLS) begin
      @(negedge clk); cycles++;
      if (out_valid) begin
        automatic int r = p / COLS;
        automatic int c = p % COLS;
        border = (r == 0) || (r == ROWS - 1) || (c < 2) || (c > COLS - 3);
        noisy = 1'b0;
        if (!border) begin
          d = int'(img[r][c-1]) - 2 * int'(img[r][c]) + int'(img[r][c+1]);
          if (d < 0) d = -d;
          noisy = (d >= int'(thr));
        end
        q = {};
        if (noisy) for (int k = 0; k < 9; k++) q.push_back(img[r + k / 3 - 1][c + k % 3 - 1]);
        exp_pix = noisy ? ref_median(q) : img[r][c];
        exp_cycles += border ? 5 : (noisy ? 16 : 15);
        checks++;
        if (int'(out_row) != r || int'(out_col) != c || out_pixel !== exp_pix || out_noisy !== noisy) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL (%0d,%0d) got (%0d,%0d) %0d/%0b exp %0d/%0b", r, c, out_row, out_col, out_pixel, out_noisy, exp_pix, noisy);
        end
        if (noisy) n_med++;
        if (img[r][c] != clean[r][c] &&
            (int'(out_pixel) - int'(clean[r][c]) <= 20) && (int'(clean[r][c]) - int'(out_pixel) <= 20)) n_fixed++;
        p++;
      end
    end
    @(negedge clk);
    checks++;
    if (cycles != exp_cycles || busy) begin
      failures++;
      $display("FAIL scan took %0d cycles, expected %0d", cycles, exp_cycles);
    end
    $display("%0d%% noise: %0d noise pixels, %0d medians applied, %0d noise pixels restored, %0d cycles",
             percent, n_noise, n_med, n_fixed, cycles);
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int v = 60 + r / 4 + c / 5;
        if ((r - 120) * (r - 120) + (c - 90) * (c - 90) < 50 * 50) v += 70;
        if (c >= 180) v -= 40;
        clean[r][c] = 8'(v);
      end
    repeat (2) @(negedge clk);
    rst = 0;
    run(10);
    run(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
