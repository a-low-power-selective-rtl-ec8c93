// tb_image_ram: fills the 900-pixel RAM with a pattern, reads every address
// back with one-cycle latency, checks that the output holds between reads and
// that writes to one address do not disturb others.
module tb_image_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we = 0, vma = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  always #5 clk = ~clk;

  image_ram dut (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                 .vma_i(vma), .raddr_i(raddr), .rdata_o(rdata));

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37 + 11) ^ (a >> 3));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 900; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 900; a++) begin
      @(negedge clk); vma = 1; raddr = 10'(a);
      @(negedge clk); vma = 0; raddr = 10'(899 - a);
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, pat(a)); end
      @(negedge clk);   // no vma: output must hold
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL hold addr %0d", a); end
    end
    // overwrite one address, neighbours unchanged
    @(negedge clk); we = 1; waddr = 10'd450; wdata = 8'hA5;
    @(negedge clk); we = 0;
    for (int a = 449; a <= 451; a++) begin
      @(negedge clk); vma = 1; raddr = 10'(a);
      @(negedge clk); vma = 0;
      checks++;
      if (rdata !== ((a == 450) ? 8'hA5 : pat(a))) begin failures++; $display("FAIL rewrite %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
