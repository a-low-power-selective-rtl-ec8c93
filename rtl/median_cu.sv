// median_cu: memory-based control unit of the selective median filter.
// After start_i it visits every pixel of the ROWS x COLS image in raster
// order. For each pixel it reads the window from the image RAM, one pixel per
// cycle (vma_o with raddr_o), and forwards each pixel to the IPU one cycle
// later, when the RAM delivers it (mvc_rd_o with widx_o). An interior pixel
// needs 11 reads: its 3x3 window and the two centre-row pixels two columns
// away, which complete the detector's 3x5 row. A border pixel, whose 3x5
// window would leave the image (first/last row, first two/last two columns),
// needs only its own value and is evaluated with bypass_o set, so it passes
// through unchanged. After the last read the unit pulses eval_o and waits for
// the IPU's result (ipu_done_i) before moving on; row_o/col_o name the pixel in
// progress. done_o pulses once after the last pixel.
// Timing per pixel: 1 setup + reads (11 interior, 1 border) + 1 drain +
// 1 eval + 1 (clean/border) or 2 (noisy) IPU cycles: 15 or 16 cycles for an
// interior pixel, 5 for a border pixel.
// The vma/mvc_rd signalling follows the filter's design; read order, border
// rule and timing are this design's own. Synchronous active-high reset.
module median_cu
  import smf_pkg::*;
#(
  parameter int unsigned ROWS = 30,
  parameter int unsigned COLS = 30,
  parameter int unsigned AW   = $clog2(ROWS * COLS),
  parameter int unsigned RW   = $clog2(ROWS),
  parameter int unsigned CW   = $clog2(COLS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_i,
  output logic          vma_o,
  output logic [AW-1:0] raddr_o,
  output logic          mvc_rd_o,
  output slot_t         widx_o,
  output logic          eval_o,
  output logic          bypass_o,
  input  logic          ipu_done_i,
  output logic [RW-1:0] row_o,
  output logic [CW-1:0] col_o,
  output logic          busy_o,
  output logic          done_o
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_READ, S_DRAIN, S_EVAL, S_WAIT} state_t;
  state_t state;

  logic  [RW-1:0] row;
  logic  [CW-1:0] col;
  slot_t          slot;      // slot being read this cycle
  slot_t          last_slot;
  logic           border;
  int             dr, dc;

  initial assert (ROWS >= 3 && COLS >= 5) else $error("median_cu: image smaller than the 3x5 window");

  assign border    = (row == '0) || (32'(row) == ROWS - 1) || (32'(col) < 2) || (32'(col) > COLS - 3);
  assign last_slot = border ? slot_t'(CENTRE) : slot_t'(WIN_SLOTS - 1);

  // Offset of the current slot inside the window.
  always_comb begin
    if (slot == slot_t'(SLOT_FARL))      begin dr = 0; dc = -2; end
    else if (slot == slot_t'(SLOT_FARR)) begin dr = 0; dc = 2;  end
    else begin dr = int'(slot) / 3 - 1; dc = int'(slot) % 3 - 1; end
    raddr_o = AW'((int'(row) + dr) * int'(COLS) + int'(col) + dc);
  end

  assign vma_o    = (state == S_READ);
  assign eval_o   = (state == S_EVAL);
  assign bypass_o = border;
  assign busy_o   = (state != S_IDLE);
  assign row_o    = row;
  assign col_o    = col;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      row      <= '0;
      col      <= '0;
      slot     <= '0;
      mvc_rd_o <= 1'b0;
      widx_o   <= '0;
      done_o   <= 1'b0;
    end else begin
      mvc_rd_o <= 1'b0;
      done_o   <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i) begin
          row   <= '0;
          col   <= '0;
          state <= S_SETUP;
        end
        S_SETUP: begin
          slot  <= border ? slot_t'(CENTRE) : '0;
          state <= S_READ;
        end
        S_READ: begin
          mvc_rd_o <= 1'b1;
          widx_o   <= slot;
          if (slot == last_slot) state <= S_DRAIN;
          else                   slot  <= slot + 1'b1;
        end
        S_DRAIN: state <= S_EVAL;
        S_EVAL:  state <= S_WAIT;
        S_WAIT: if (ipu_done_i) begin
          state <= S_SETUP;
          if (32'(col) == COLS - 1) begin
            col <= '0;
            if (32'(row) == ROWS - 1) begin
              done_o <= 1'b1;
              state  <= S_IDLE;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
