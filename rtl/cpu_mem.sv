// cpu_mem: program and data memory of the 16-bit CPU, 64 words of 16 bits.
// The CPU requests an access by holding vma_i (valid memory address) with
// addr_i and rw_i (1 = write wdata_i). The memory performs it on the next
// clock edge and answers with ready_o high for one cycle; for a read, rdata_o
// holds the word from that cycle on. The CPU must keep its request steady
// until ready_o. A separate load port fills the memory (programs, data) while
// the CPU is held in reset.
// The VMA/Ready/Addr/Data interface follows the CPU's top-level drawing; the
// 16-bit word (the CPU's specification lists 64 locations of 8 bits but a
// 16-bit data bus and 16-bit instructions) and the one-cycle ready are this
// design's choices.
module cpu_mem #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          vma_i,
  input  logic          rw_i,
  input  logic [AW-1:0] addr_i,
  input  logic [W-1:0]  wdata_i,
  output logic [W-1:0]  rdata_o,
  output logic          ready_o,
  input  logic          load_we_i,
  input  logic [AW-1:0] load_addr_i,
  input  logic [W-1:0]  load_data_i
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we_i) mem[load_addr_i] <= load_data_i;
    else if (vma_i && rw_i && !ready_o) mem[addr_i] <= wdata_i;
    if (vma_i && !rw_i && !ready_o) rdata_o <= mem[addr_i];
  end

  always_ff @(posedge clk) begin
    if (rst) ready_o <= 1'b0;
    else     ready_o <= vma_i && !ready_o;
  end
endmodule
