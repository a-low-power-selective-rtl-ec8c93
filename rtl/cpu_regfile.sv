// cpu_regfile: the CPU's array of eight 16-bit registers.
// Two combinational read ports (A, B) and one write port written on the rising
// clock edge when we_i is set. Synchronous active-high reset clears all
// registers. A read of the register being written returns the old value.
module cpu_regfile #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned W     = 16,
  parameter int unsigned RA    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we_i,
  input  logic [RA-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [RA-1:0] raddr_a_i,
  input  logic [RA-1:0] raddr_b_i,
  output logic [W-1:0]  rdata_a_o,
  output logic [W-1:0]  rdata_b_o
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we_i) begin
      regs[waddr_i] <= wdata_i;
    end
  end

  assign rdata_a_o = regs[raddr_a_i];
  assign rdata_b_o = regs[raddr_b_i];
endmodule
