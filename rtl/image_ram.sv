// image_ram: image memory, DEPTH pixels of W bits (30 x 30 = 900 by default,
// the size of the filter's image store). One write port loads the image; one
// read port, enabled by vma_i (valid memory address), returns the addressed
// pixel on rdata_o one clock later and holds it until the next read.
// The one-cycle synchronous read and the separate load port are this design's
// own choices. Contents are not reset.
module image_ram #(
  parameter int unsigned DEPTH = 900,
  parameter int unsigned W     = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic          vma_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && 32'(waddr_i) < DEPTH) mem[waddr_i] <= wdata_i;
    if (vma_i) rdata_o <= (32'(raddr_i) < DEPTH) ? mem[raddr_i] : '0;
  end
endmodule
