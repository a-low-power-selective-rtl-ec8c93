// tb_smf_top: end-to-end test of the top level at its default size.
// Filter: a 30 x 30 synthetic image (smooth gradient with a vertical edge)
// with about 15% salt-and-pepper noise is loaded and filtered twice, first
// with the threshold 100, then with the largest threshold (nothing is
// noisy, every pixel must pass through). Every output pixel, its
// coordinates, the median decision and the scan's cycle count are checked
// against a model in the testbench.
// CPU: meanwhile the test program runs on the CPU; its registers, stored
// word and cycle count are checked.
// Each mechanism is counted and must occur: median applied, clean pass,
// border bypass, CPU taken branch, load, store and halt.
module tb_smf_top;
  import smf_pkg::*;
  import tb_cpu_prog_pkg::*;
  localparam int ROWS = 30, COLS = 30;
  int checks = 0, failures = 0;
  int n_noisy = 0, n_clean = 0, n_border = 0, n_branch = 0, n_load = 0, n_store = 0, n_halt = 0;

  logic clk = 0, rst = 1;
  logic ip_we = 0, ip_start = 0;
  logic [9:0] ip_addr = '0;
  pixel_t ip_data = '0;
  logic [DD_W-1:0] thr = DEFAULT_THRESHOLD;
  logic ip_valid, ip_noisy, ip_busy, ip_done;
  pixel_t ip_pixel;
  logic [4:0] ip_row, ip_col;
  logic cpu_rst = 1, cpu_we = 0, cpu_halted;
  logic [5:0] cpu_la = '0, cpu_pc;
  logic [15:0] cpu_ld = '0;
  always #5 clk = ~clk;

  smf_top dut (
    .clk(clk), .rst(rst),
    .ip_load_we_i(ip_we), .ip_load_addr_i(ip_addr), .ip_load_data_i(ip_data),
    .ip_start_i(ip_start), .ip_threshold_i(thr),
    .ip_out_valid_o(ip_valid), .ip_out_pixel_o(ip_pixel), .ip_out_row_o(ip_row),
    .ip_out_col_o(ip_col), .ip_out_noisy_o(ip_noisy), .ip_busy_o(ip_busy), .ip_done_o(ip_done),
    .cpu_rst_i(cpu_rst), .cpu_load_we_i(cpu_we), .cpu_load_addr_i(cpu_la), .cpu_load_data_i(cpu_ld),
    .cpu_halted_o(cpu_halted), .cpu_pc_o(cpu_pc));

  pixel_t img [ROWS][COLS];
  logic [15:0] prog [64];

  function automatic pixel_t ref_median(pixel_t v [$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  // CPU activity monitors.
  logic [5:0] pc_q;
  int cpu_cycles = 0;
  logic cpu_running = 0;
  always @(posedge clk) begin
    pc_q <= cpu_pc;
    if (cpu_running && !cpu_halted) cpu_cycles++;
    if (!cpu_rst && !rst && cpu_pc != pc_q && cpu_pc != pc_q + 6'd1) n_branch++;
    if (dut.u_cpu.vma && dut.u_cpu.ready && dut.u_cpu.rw) n_store++;
    if (dut.u_cpu.u_core.ctrl.reg_sel && dut.u_cpu.u_core.state == dut.u_cpu.u_core.S_MEM) n_load++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic filter_pass(input logic [DD_W-1:0] t);
    int p, d, cycles, exp_cycles;
    logic border, noisy;
    pixel_t exp_pix;
    pixel_t q [$];
    thr = t;
    @(negedge clk); ip_start = 1;
    @(negedge clk); ip_start = 0;
    cycles = 1; exp_cycles = 0; p = 0;
    while (p < ROWS * COLS) begin
      @(negedge clk); cycles++;
      if (ip_valid) begin
        automatic int r = p / COLS;
        automatic int c = p % COLS;
        border = (r == 0) || (r == ROWS - 1) || (c < 2) || (c > COLS - 3);
        noisy = 1'b0;
        if (!border) begin
          d = int'(img[r][c-1]) - 2 * int'(img[r][c]) + int'(img[r][c+1]);
          if (d < 0) d = -d;
          noisy = (d >= int'(t));
        end
        q = {};
        if (noisy) for (int k = 0; k < 9; k++) q.push_back(img[r + k / 3 - 1][c + k % 3 - 1]);
        exp_pix = noisy ? ref_median(q) : img[r][c];
        exp_cycles += border ? 5 : (noisy ? 16 : 15);
        checks++;
        if (int'(ip_row) != r || int'(ip_col) != c || ip_pixel !== exp_pix || ip_noisy !== noisy) begin
          failures++;
          $display("FAIL (%0d,%0d) got (%0d,%0d) %0d/%0b exp %0d/%0b", r, c, ip_row, ip_col, ip_pixel, ip_noisy, exp_pix, noisy);
        end
        if (border) n_border++; else if (noisy) n_noisy++; else n_clean++;
        p++;
      end
    end
    @(negedge clk);
    checks++;
    if (cycles != exp_cycles || ip_busy) begin
      failures++;
      $display("FAIL scan took %0d cycles, expected %0d", cycles, exp_cycles);
    end
    $display("threshold %0d: %0d cycles, %0d median, %0d clean, %0d border so far", t, cycles, n_noisy, n_clean, n_border);
  endtask

  initial begin
    int noisy_after_first;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = 8'(40 + 3 * r + 2 * c + ((c >= 15) ? 60 : 0) + $urandom_range(5));
        if ($urandom_range(99) < 15) img[r][c] = ($urandom_range(1) == 1) ? 8'd255 : 8'd0;
      end
    load_program(prog);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < ROWS * COLS; a++) begin
      @(negedge clk);
      ip_we = 1; ip_addr = 10'(a); ip_data = img[a / COLS][a % COLS];
      cpu_we = (a < 64); cpu_la = 6'(a); cpu_ld = prog[a % 64];
    end
    @(negedge clk); ip_we = 0; cpu_we = 0;
    cpu_rst = 0; cpu_running = 1;
    filter_pass(DEFAULT_THRESHOLD);
    noisy_after_first = n_noisy;
    filter_pass('1);
    checks++;
    if (n_noisy != noisy_after_first) begin failures++; $display("FAIL median applied at maximum threshold"); end

    // CPU results
    checks += 3;
    if (!cpu_halted) begin failures++; $display("FAIL CPU did not halt"); end
    else n_halt++;
    if (cpu_cycles != EXP_CYCLES) begin failures++; $display("FAIL CPU took %0d cycles, expected %0d", cpu_cycles, EXP_CYCLES); end
    if (dut.u_cpu.u_mem.mem[STORE_ADDR] !== EXP_REGS[0]) begin failures++; $display("FAIL CPU stored word"); end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_cpu.u_core.u_rf.regs[r] !== EXP_REGS[r]) begin failures++; $display("FAIL CPU R%0d", r); end
    end

    $display("mechanisms: median %0d clean %0d border %0d branch %0d load %0d store %0d halt %0d",
             n_noisy, n_clean, n_border, n_branch, n_load, n_store, n_halt);
    checks++;
    if (n_noisy == 0 || n_clean == 0 || n_border == 0 || n_branch == 0 || n_load == 0 || n_store == 0 || n_halt == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
