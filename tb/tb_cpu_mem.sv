// tb_cpu_mem: loads the memory through the load port, then performs CPU-side
// reads and writes with the VMA/Ready handshake. Checks that Ready comes
// exactly one cycle after VMA, read data, and that written words read back.
module tb_cpu_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, vma = 0, rw = 0, lwe = 0, ready;
  logic [5:0] addr = '0, la = '0;
  logic [15:0] wd = '0, ld = '0, rd;
  logic [15:0] shadow [64];
  always #5 clk = ~clk;
  cpu_mem dut (.clk(clk), .rst(rst), .vma_i(vma), .rw_i(rw), .addr_i(addr), .wdata_i(wd),
               .rdata_o(rd), .ready_o(ready), .load_we_i(lwe), .load_addr_i(la), .load_data_i(ld));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic w, input logic [5:0] a, input logic [15:0] d);
    int lat;
    @(negedge clk); vma = 1; rw = w; addr = a; wd = d;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!ready && lat < 5);
    checks++;
    if (lat != 1) begin failures++; $display("FAIL ready after %0d cycles", lat); end
    if (!w) begin
      checks++;
      if (rd !== shadow[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, rd, shadow[a]); end
    end else shadow[a] = d;
    vma = 0;
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); lwe = 1; la = 6'(a); ld = 16'(a * 1031); shadow[a] = 16'(a * 1031);
    end
    @(negedge clk); lwe = 0; rst = 0;
    for (int t = 0; t < 500; t++) access(1'(t % 3 == 0), 6'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
