// tb_cpu_system: loads the test program through the load port, releases
// reset, and checks the halt, the cycle count, the eight registers and the
// stored word.
module tb_cpu_system;
  import tb_cpu_prog_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [5:0] la = '0;
  logic [15:0] ld = '0;
  logic halted;
  logic [5:0] pc;
  logic [15:0] prog [64];
  always #5 clk = ~clk;

  cpu_system dut (.clk(clk), .rst(rst), .load_we_i(we), .load_addr_i(la), .load_data_i(ld),
                  .halted_o(halted), .pc_o(pc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    load_program(prog);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; la = 6'(a); ld = prog[a];
    end
    @(negedge clk); we = 0;
    rst = 0;
    cycles = 0;
    while (!halted && cycles < 2000) begin @(negedge clk); cycles++; end
    checks += 2;
    if (!halted) begin failures++; $display("FAIL did not halt"); end
    if (cycles != EXP_CYCLES) begin failures++; $display("FAIL %0d cycles, expected %0d", cycles, EXP_CYCLES); end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (dut.u_core.u_rf.regs[r] !== EXP_REGS[r]) begin
        failures++;
        $display("FAIL R%0d = %h expected %h", r, dut.u_core.u_rf.regs[r], EXP_REGS[r]);
      end
    end
    checks++;
    if (dut.u_mem.mem[STORE_ADDR] !== EXP_REGS[0]) begin failures++; $display("FAIL stored word %h", dut.u_mem.mem[STORE_ADDR]); end
    checks++;
    if (pc != 6'(PROG_LEN)) begin failures++; $display("FAIL pc %0d", pc); end
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
