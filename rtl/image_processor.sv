// image_processor: the selective median filter as a small image processor.
// An image RAM (30 x 30 pixels by default), the control unit and the image
// processing unit are wired together. The host loads the image through the
// load port, sets the detector threshold (100 in the filter's own
// experiments) and pulses start_i. Every pixel is then filtered in raster
// order: border pixels pass through, interior pixels are checked by the
// double-derivative detector and replaced by the median of their 3x3 window
// when flagged noisy. Each result leaves on out_pixel_o with out_valid_o,
// together with its row and column and whether the median was applied.
// done_o pulses after the last pixel. See median_cu for per-pixel timing.
// Streaming the results out instead of storing them is this design's choice.
module image_processor
  import smf_pkg::*;
#(
  parameter int unsigned ROWS  = 30,
  parameter int unsigned COLS  = 30,
  parameter int unsigned LOGIC = 3,
  parameter int unsigned AW    = $clog2(ROWS * COLS),
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned CW    = $clog2(COLS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load_we_i,
  input  logic [AW-1:0]   load_addr_i,
  input  pixel_t          load_data_i,
  input  logic            start_i,
  input  logic [DD_W-1:0] threshold_i,
  output logic            out_valid_o,
  output pixel_t          out_pixel_o,
  output logic [RW-1:0]   out_row_o,
  output logic [CW-1:0]   out_col_o,
  output logic            out_noisy_o,
  output logic            busy_o,
  output logic            done_o
);
  logic          vma, mvc_rd, eval, bypass;
  logic [AW-1:0] raddr;
  slot_t         widx;
  pixel_t        rdata;

  image_ram #(.DEPTH(ROWS * COLS), .W(PIX_W)) u_ram (
    .clk    (clk),
    .we_i   (load_we_i),
    .waddr_i(load_addr_i),
    .wdata_i(load_data_i),
    .vma_i  (vma),
    .raddr_i(raddr),
    .rdata_o(rdata)
  );

  median_cu #(.ROWS(ROWS), .COLS(COLS)) u_cu (
    .clk       (clk),
    .rst       (rst),
    .start_i   (start_i),
    .vma_o     (vma),
    .raddr_o   (raddr),
    .mvc_rd_o  (mvc_rd),
    .widx_o    (widx),
    .eval_o    (eval),
    .bypass_o  (bypass),
    .ipu_done_i(out_valid_o),
    .row_o     (out_row_o),
    .col_o     (out_col_o),
    .busy_o    (busy_o),
    .done_o    (done_o)
  );

  ipu #(.LOGIC(LOGIC)) u_ipu (
    .clk        (clk),
    .rst        (rst),
    .mvc_rd_i   (mvc_rd),
    .widx_i     (widx),
    .wdata_i    (rdata),
    .eval_i     (eval),
    .bypass_i   (bypass),
    .threshold_i(threshold_i),
    .out_valid_o(out_valid_o),
    .out_pixel_o(out_pixel_o),
    .out_noisy_o(out_noisy_o)
  );
endmodule
