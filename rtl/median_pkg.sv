// median_pkg: types and constants shared by the 2D median filter.
//
// Pixels are 24-bit RGB (8 bits per component). The sorting key ("filter
// value") is Y = R + G + B, which needs 10 bits (maximum 765). Control flags
// line_end / frame_end travel with each pixel and mark the last pixel of a
// line and of a frame. Inside the front-end, a pixel column is sent to the
// sorter one sample per clock; col_last marks the last (bottom, newest)
// sample of a column, which is the one that completes a filter window.
package median_pkg;

  localparam int unsigned COMP_W = 8;              // bits per colour component
  localparam int unsigned FV_W   = COMP_W + 2;     // R+G+B fits in 10 bits

  typedef struct packed {
    logic [COMP_W-1:0] r;
    logic [COMP_W-1:0] g;
    logic [COMP_W-1:0] b;
  } rgb_t;

  typedef logic [FV_W-1:0] fv_t;

  typedef struct packed {
    logic line_end;   // last pixel of a line
    logic frame_end;  // last pixel of a frame
  } ctrl_t;

  // One sample of the serial stream that feeds the sorter.
  typedef struct packed {
    rgb_t  rgb;
    logic  col_last;  // last sample of its column: a window is complete
    ctrl_t ctrl;      // flags of the input pixel, valid on col_last samples
  } sample_t;

  // Same sample after the filter value generator.
  typedef struct packed {
    fv_t   fv;
    logic  col_last;
    ctrl_t ctrl;
  } fv_sample_t;

  // Operation selected by a sorting cell in a clock cycle.
  typedef enum logic [1:0] {
    SEL_KEEP  = 2'd0,
    SEL_NEW   = 2'd1,
    SEL_LEFT  = 2'd2,
    SEL_RIGHT = 2'd3
  } cell_sel_e;

endpackage
