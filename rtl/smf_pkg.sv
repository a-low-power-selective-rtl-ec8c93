// smf_pkg: constants and types shared by the selective median filter.
// Pixels are 8-bit grey levels. The image processing unit keeps an 11-slot
// window: slots 0..8 hold the 3x3 median window row-major (x11..x33), slots 9
// and 10 the centre-row pixels two columns left and right of the target, which
// complete the five-pixel row the double-derivative detector looks at.
// The slot layout is this design's own choice.
package smf_pkg;
  localparam int unsigned PIX_W     = 8;
  localparam int unsigned WIN_SLOTS = 11;
  localparam int unsigned SLOT_W    = 4;
  localparam int unsigned CENTRE    = 4;   // slot of the target pixel
  localparam int unsigned SLOT_FARL = 9;   // centre row, column -2
  localparam int unsigned SLOT_FARR = 10;  // centre row, column +2
  localparam int unsigned DD_W      = PIX_W + 2; // |a - 2b + c| needs two extra bits
  localparam logic [DD_W-1:0] DEFAULT_THRESHOLD = DD_W'(100);

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [SLOT_W-1:0] slot_t;
endpackage
