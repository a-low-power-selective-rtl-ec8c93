// tb_image_processor: end-to-end run of the selective median filter on a small
// 6 x 9 image with salt-and-pepper noise. A behavioural model in the testbench
// computes, for every pixel, the detector decision and the expected output
// (border pixels unchanged, noisy interior pixels replaced by the 3x3 median),
// and the total cycle count of the scan.
module tb_image_processor;
  import smf_pkg::*;
  localparam int ROWS = 6, COLS = 9;
  int checks = 0, failures = 0;
  int n_noisy = 0, n_clean = 0, n_border = 0;

  logic clk = 0, rst = 1, we = 0, start = 0;
  logic [5:0] waddr = '0;
  pixel_t wdata = '0;
  logic [DD_W-1:0] thr = DEFAULT_THRESHOLD;
  logic out_valid, out_noisy, busy, done;
  pixel_t out_pixel;
  logic [2:0] out_row;
  logic [3:0] out_col;
  always #5 clk = ~clk;

  image_processor #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst), .load_we_i(we), .load_addr_i(waddr), .load_data_i(wdata),
    .start_i(start), .threshold_i(thr), .out_valid_o(out_valid), .out_pixel_o(out_pixel),
    .out_row_o(out_row), .out_col_o(out_col), .out_noisy_o(out_noisy), .busy_o(busy), .done_o(done));

  pixel_t img [ROWS][COLS];

  function automatic pixel_t ref_median(pixel_t v [$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, d, cycles, exp_cycles;
    logic border, noisy;
    pixel_t exp_pix;
    pixel_t q [$];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = 8'(80 + 4 * r + 3 * c + $urandom_range(6));
        if ($urandom_range(99) < 20) img[r][c] = ($urandom_range(1) == 1) ? 8'd255 : 8'd0;
      end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < ROWS * COLS; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = img[a / COLS][a % COLS];
    end
    @(negedge clk); we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1; exp_cycles = 0; p = 0;
    while (p < ROWS * COLS) begin
      @(negedge clk); cycles++;
      if (out_valid) begin
        automatic int r = p / COLS;
        automatic int c = p % COLS;
        border = (r == 0) || (r == ROWS - 1) || (c < 2) || (c > COLS - 3);
        d = int'(img[r][c-1 < 0 ? 0 : c-1]) - 2 * int'(img[r][c]) + int'(img[r][c+1 >= COLS ? COLS-1 : c+1]);
        if (d < 0) d = -d;
        noisy = !border && (d >= int'(thr));
        q = {};
        if (noisy) for (int k = 0; k < 9; k++) q.push_back(img[r + k / 3 - 1][c + k % 3 - 1]);
        exp_pix = noisy ? ref_median(q) : img[r][c];
        exp_cycles += border ? 5 : (noisy ? 16 : 15);
        checks += 2;
        if (int'(out_row) != r || int'(out_col) != c) begin failures++; $display("FAIL coords %0d,%0d exp %0d,%0d", out_row, out_col, r, c); end
        if (out_pixel !== exp_pix || out_noisy !== noisy) begin
          failures++;
          $display("FAIL pixel %0d,%0d got %0d/%0b exp %0d/%0b", r, c, out_pixel, out_noisy, exp_pix, noisy);
        end
        if (border) n_border++; else if (noisy) n_noisy++; else n_clean++;
        p++;
      end
    end
    @(negedge clk);
    checks += 2;
    if (busy) begin failures++; $display("FAIL busy after last pixel"); end
    if (cycles != exp_cycles) begin failures++; $display("FAIL scan took %0d cycles, expected %0d", cycles, exp_cycles); end
    checks++;
    if (n_noisy == 0 || n_clean == 0 || n_border == 0) begin failures++; $display("FAIL coverage"); end
    $display("noisy %0d clean %0d border %0d cycles %0d", n_noisy, n_clean, n_border, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
