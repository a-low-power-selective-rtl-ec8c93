// tb_median_cu: runs the control unit over a 5 x 7 image with a model of the
// IPU's done response (1 or 2 cycles after eval). Checks, per pixel, the
// addresses it reads (11 window addresses for interior pixels, only the centre
// for border ones), that each read is forwarded to the right slot one cycle
// later, the bypass flag, the per-pixel cycle count and the final done pulse.
module tb_median_cu;
  import smf_pkg::*;
  localparam int ROWS = 5, COLS = 7;
  int checks = 0, failures = 0;
  int n_border = 0, n_interior = 0;

  logic clk = 0, rst = 1, start = 0, ipu_done = 0;
  logic vma, mvc_rd, eval, bypass, busy, done;
  logic [5:0] raddr;
  slot_t widx;
  logic [2:0] row;
  logic [2:0] col;
  always #5 clk = ~clk;

  median_cu #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst), .start_i(start), .vma_o(vma), .raddr_o(raddr),
    .mvc_rd_o(mvc_rd), .widx_o(widx), .eval_o(eval), .bypass_o(bypass),
    .ipu_done_i(ipu_done), .row_o(row), .col_o(col), .busy_o(busy), .done_o(done));

  // IPU model: done one cycle after eval, or two for every third pixel.
  int eval_count = 0;
  logic [1:0] pend = '0;
  always_ff @(posedge clk) begin
    ipu_done <= 1'b0;
    if (eval) begin
      eval_count <= eval_count + 1;
      if (eval_count % 3 == 2) pend <= 2'd1; else ipu_done <= 1'b1;
    end
    if (pend == 2'd1) begin pend <= '0; ipu_done <= 1'b1; end
  end

  // Expected read list of the pixel in progress.
  int exp_addr [$];
  int exp_slot [$];
  int got_addr [$];
  int got_slot [$];
  logic vma_q;
  int   slot_expected_q;

  always @(posedge clk) begin
    if (vma) got_addr.push_back(int'(raddr));
    if (mvc_rd) got_slot.push_back(int'(widx));
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c, cyc, exp_cyc;
    logic is_border;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int p = 0; p < ROWS * COLS; p++) begin
      r = p / COLS; c = p % COLS;
      is_border = (r == 0) || (r == ROWS - 1) || (c < 2) || (c > COLS - 3);
      exp_addr = {}; exp_slot = {};
      if (is_border) begin
        exp_addr.push_back(r * COLS + c); exp_slot.push_back(CENTRE);
      end else begin
        for (int k = 0; k < 9; k++) begin
          exp_addr.push_back((r + k / 3 - 1) * COLS + c + k % 3 - 1); exp_slot.push_back(k);
        end
        exp_addr.push_back(r * COLS + c - 2); exp_slot.push_back(SLOT_FARL);
        exp_addr.push_back(r * COLS + c + 2); exp_slot.push_back(SLOT_FARR);
      end
      got_addr = {}; got_slot = {};
      cyc = 0;
      while (!eval) begin @(negedge clk); cyc++; end
      checks += 4;
      if (int'(row) != r || int'(col) != c) begin failures++; $display("FAIL pixel %0d,%0d shown as %0d,%0d", r, c, row, col); end
      if (bypass !== is_border) begin failures++; $display("FAIL bypass at %0d,%0d", r, c); end
      if (got_addr != exp_addr) begin failures++; $display("FAIL addresses at %0d,%0d: %p vs %p", r, c, got_addr, exp_addr); end
      if (got_slot != exp_slot) begin failures++; $display("FAIL slots at %0d,%0d: %p vs %p", r, c, got_slot, exp_slot); end
      while (!ipu_done) begin @(negedge clk); cyc++; end
      @(negedge clk); cyc++;
      // from the cycle after the previous pixel's done to this one's done
      exp_cyc = 1 + (is_border ? 1 : 11) + 1 + 1 + ((p % 3 == 2) ? 2 : 1);
      checks++;
      if (p > 0 && cyc != exp_cyc) begin failures++; $display("FAIL cycles at %0d,%0d: %0d exp %0d", r, c, cyc, exp_cyc); end
      if (is_border) n_border++; else n_interior++;
      if (p == ROWS * COLS - 1) begin
        checks++;
        if (!done && busy) begin failures++; $display("FAIL no done pulse"); end
      end
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("border %0d interior %0d", n_border, n_interior);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
