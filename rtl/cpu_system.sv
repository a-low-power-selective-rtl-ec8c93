// cpu_system: the 16-bit CPU connected to its 64-word memory through the
// VMA, Ready, Addr and Data lines of the CPU's top-level drawing. A program is
// loaded through the load port while rst is high; after reset the CPU runs
// from address 0 until it executes HALT (halted_o). pc_o shows the program
// counter.
module cpu_system #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load_we_i,
  input  logic [AW-1:0] load_addr_i,
  input  logic [W-1:0]  load_data_i,
  output logic          halted_o,
  output logic [AW-1:0] pc_o
);
  logic          vma, rw, ready;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata, rdata;

  cpu_core #(.W(W), .AW(AW)) u_core (
    .clk(clk), .rst(rst), .vma_o(vma), .rw_o(rw), .addr_o(addr), .wdata_o(wdata),
    .rdata_i(rdata), .ready_i(ready), .halted_o(halted_o), .pc_o(pc_o)
  );

  cpu_mem #(.DEPTH(1 << AW), .W(W)) u_mem (
    .clk(clk), .rst(rst), .vma_i(vma), .rw_i(rw), .addr_i(addr), .wdata_i(wdata),
    .rdata_o(rdata), .ready_o(ready),
    .load_we_i(load_we_i), .load_addr_i(load_addr_i), .load_data_i(load_data_i)
  );
endmodule
