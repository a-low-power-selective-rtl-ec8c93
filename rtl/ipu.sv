// ipu: image processing unit of the selective median filter.
// The control unit writes the window pixels of one target pixel into eleven
// slot registers (mvc_rd_i, widx_i, wdata_i; slot layout in smf_pkg), then
// pulses eval_i. The double-derivative detector looks at the centre row
// (slots 9, 3, 4, 5, 10). If the target is flagged noisy, the nine 3x3 slots
// are copied into the median circuit's input register and its median is
// output on the next cycle; otherwise, or when bypass_i marks a border pixel,
// the target pixel itself is output at once.
// Low power: the median circuit's input register loads only for noisy pixels,
// so the sorting logic does not switch while clean pixels stream past. The
// selection by the detector follows the filter's design; this operand gating
// is this design's way of realising its saving.
// Timing: out_valid_o pulses 1 cycle after eval_i for clean or border pixels,
// 2 cycles after eval_i for noisy ones. Do not write slots while a result is
// pending. Synchronous active-high reset clears the control state.
module ipu
  import smf_pkg::*;
#(
  parameter int unsigned LOGIC = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             mvc_rd_i,
  input  slot_t            widx_i,
  input  pixel_t           wdata_i,
  input  logic             eval_i,
  input  logic             bypass_i,
  input  logic [DD_W-1:0]  threshold_i,
  output logic             out_valid_o,
  output pixel_t           out_pixel_o,
  output logic             out_noisy_o
);
  pixel_t            win   [WIN_SLOTS];
  pixel_t            mvc_in [9];
  pixel_t            row   [5];
  logic [DD_W-1:0]   dd    [3];
  logic              noisy;
  logic              pending;
  pixel_t            median;

  always_ff @(posedge clk) begin
    if (mvc_rd_i && widx_i < SLOT_W'(WIN_SLOTS)) win[widx_i] <= wdata_i;
  end

  assign row = '{win[SLOT_FARL], win[CENTRE-1], win[CENTRE], win[CENTRE+1], win[SLOT_FARR]};

  dd_detector #(.W(PIX_W)) u_dd (
    .row_i(row), .threshold_i(threshold_i), .dd_o(dd), .noisy_o(noisy)
  );

  // Median input register: loaded only for pixels that need the median.
  always_ff @(posedge clk) begin
    if (eval_i && !bypass_i && noisy)
      for (int unsigned k = 0; k < 9; k++) mvc_in[k] <= win[k];
  end

  mvc_median #(.N(9), .W(PIX_W), .LOGIC(LOGIC)) u_mvc (.data_i(mvc_in), .median_o(median));

  always_ff @(posedge clk) begin
    if (rst) begin
      pending     <= 1'b0;
      out_valid_o <= 1'b0;
      out_pixel_o <= '0;
      out_noisy_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      if (pending) begin
        pending     <= 1'b0;
        out_valid_o <= 1'b1;
        out_pixel_o <= median;
        out_noisy_o <= 1'b1;
      end else if (eval_i) begin
        if (bypass_i || !noisy) begin
          out_valid_o <= 1'b1;
          out_pixel_o <= win[CENTRE];
          out_noisy_o <= 1'b0;
        end else begin
          pending <= 1'b1;
        end
      end
    end
  end

  // dd[0] and dd[2] are the neighbouring second differences; only the centre
  // one decides.
  logic unused_dd;
  assign unused_dd = ^{dd[0], dd[2]};

  assert property (@(posedge clk) disable iff (rst) pending |-> !eval_i && !mvc_rd_i)
    else $error("ipu: window written or evaluated while a median is pending");
endmodule
