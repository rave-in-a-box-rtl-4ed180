// rave_pkg: types and constants shared by the audio-analysis and graphics
// halves of the laser show.
//
// A chroma vector holds twelve 16-bit pitch-class intensities, C first.
// The FIFO controller modes follow the numbering used by the original
// design (idle, load, unload, cycle, shift). Coordinates are 12-bit, the
// resolution of the MCP4822 DACs that steer the galvanometers.
package rave_pkg;

  localparam int unsigned NUM_PITCH   = 12;
  localparam int unsigned CHROMA_BITS = 16;
  localparam int unsigned COORD_BITS  = 12;

  typedef logic [NUM_PITCH-1:0][CHROMA_BITS-1:0] chroma_t;

  typedef enum logic [2:0] {
    FIFO_IDLE   = 3'd0,
    FIFO_LOAD   = 3'd1,
    FIFO_UNLOAD = 3'd2,
    FIFO_CYCLE  = 3'd3,
    FIFO_SHIFT  = 3'd4
  } fifo_mode_e;

  // One graphics instruction: a cubic Bezier curve and the laser state.
  typedef struct packed {
    logic [COORD_BITS-1:0] p0x, p0y, p1x, p1y, p2x, p2y, p3x, p3y;
    logic                  laser_on;
  } bezier_instr_t;

endpackage
