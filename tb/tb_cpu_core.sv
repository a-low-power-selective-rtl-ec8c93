// tb_cpu_core: the CPU core against a behavioural memory in the testbench
// whose Ready comes 1 to 4 cycles after VMA, so every access stalls a random
// time. Checks the bus rule (request steady until Ready), that the program
// halts, the registers, the stored word, and the number of instruction
// fetches and stalls seen.
module tb_cpu_core;
  import tb_cpu_prog_pkg::*;
  int checks = 0, failures = 0;
  int n_fetch = 0, n_stall = 0, n_write = 0;
  logic clk = 0, rst = 1;
  logic vma, rw, ready = 0, halted;
  logic [5:0] addr, pc;
  logic [15:0] wdata, rdata = '0;
  logic [15:0] mem [64];
  int wait_left = -1;
  always #5 clk = ~clk;

  cpu_core dut (.clk(clk), .rst(rst), .vma_o(vma), .rw_o(rw), .addr_o(addr), .wdata_o(wdata),
                .rdata_i(rdata), .ready_i(ready), .halted_o(halted), .pc_o(pc));

  // Memory model with random latency.
  logic [5:0] addr_q;
  logic       rw_q;
  always @(posedge clk) begin
    ready <= 1'b0;
    if (!rst && vma && !ready) begin
      if (wait_left < 0) begin
        wait_left = $urandom_range(3);
        addr_q = addr; rw_q = rw;
      end else begin
        n_stall++;
        checks++;
        if (addr != addr_q || rw != rw_q) begin failures++; $display("FAIL request changed while waiting"); end
      end
      if (wait_left == 0) begin
        if (rw) begin mem[addr] <= wdata; n_write++; end
        else rdata <= mem[addr];
        ready <= 1'b1;
        wait_left = -1;
      end else begin
        wait_left--;
      end
    end
  end

  always @(posedge clk) if (!rst && dut.ctrl.instr_sel) n_fetch++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    cycles = 0;
    load_program(mem);
    repeat (3) @(negedge clk);
    rst = 0;
    while (!halted && cycles < 5000) begin @(negedge clk); cycles++; end
    checks++;
    if (!halted) begin failures++; $display("FAIL did not halt"); end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== EXP_REGS[r]) begin
        failures++;
        $display("FAIL R%0d = %h expected %h", r, dut.u_rf.regs[r], EXP_REGS[r]);
      end
    end
    checks += 3;
    if (mem[STORE_ADDR] !== EXP_REGS[0]) begin failures++; $display("FAIL stored word %h", mem[STORE_ADDR]); end
    // instructions executed: 4 MOVI, 5 x (MUL SUB CMP BGT), then 14 more
    checks++;
    if (n_fetch != 4 + 5 * 4 + 14) begin failures++; $display("FAIL %0d instructions fetched", n_fetch); end
    if (n_write != 1) begin failures++; $display("FAIL %0d writes", n_write); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("cycles %0d fetches %0d stalls %0d", cycles, n_fetch, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
