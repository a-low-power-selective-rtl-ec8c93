// smf_top: top level. Two independent designs stand side by side:
//  - ip_*  : the selective median filter image processor (image_processor):
//            load a 30 x 30 image, set the detector threshold, start, and
//            collect the filtered pixels as they stream out;
//  - cpu_* : the small 16-bit CPU with its memory (cpu_system): load a
//            program while in reset, release reset, wait for cpu_halted_o.
// Both run on the same clock and reset; they share no other signal.
module smf_top
  import smf_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // selective median filter
  input  logic            ip_load_we_i,
  input  logic [9:0]      ip_load_addr_i,
  input  pixel_t          ip_load_data_i,
  input  logic            ip_start_i,
  input  logic [DD_W-1:0] ip_threshold_i,
  output logic            ip_out_valid_o,
  output pixel_t          ip_out_pixel_o,
  output logic [4:0]      ip_out_row_o,
  output logic [4:0]      ip_out_col_o,
  output logic            ip_out_noisy_o,
  output logic            ip_busy_o,
  output logic            ip_done_o,
  // 16-bit CPU
  input  logic            cpu_rst_i,
  input  logic            cpu_load_we_i,
  input  logic [5:0]      cpu_load_addr_i,
  input  logic [15:0]     cpu_load_data_i,
  output logic            cpu_halted_o,
  output logic [5:0]      cpu_pc_o
);
  image_processor u_ip (
    .clk(clk), .rst(rst),
    .load_we_i(ip_load_we_i), .load_addr_i(ip_load_addr_i), .load_data_i(ip_load_data_i),
    .start_i(ip_start_i), .threshold_i(ip_threshold_i),
    .out_valid_o(ip_out_valid_o), .out_pixel_o(ip_out_pixel_o),
    .out_row_o(ip_out_row_o), .out_col_o(ip_out_col_o), .out_noisy_o(ip_out_noisy_o),
    .busy_o(ip_busy_o), .done_o(ip_done_o)
  );

  cpu_system u_cpu (
    .clk(clk), .rst(rst || cpu_rst_i),
    .load_we_i(cpu_load_we_i), .load_addr_i(cpu_load_addr_i), .load_data_i(cpu_load_data_i),
    .halted_o(cpu_halted_o), .pc_o(cpu_pc_o)
  );
endmodule
