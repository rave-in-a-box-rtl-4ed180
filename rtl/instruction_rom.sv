// instruction_rom: the vector-graphics program, one Bezier curve per word.
//
// The address is {scene, frame, instruction}. Each 97-bit word is a
// bezier_instr_t: the four control points of a cubic curve as 12-bit x/y
// pairs (p0x in the top bits) and, in bit 0, whether the laser is on while
// the curve is traced. `word` shows the entry for `addr` two clocks later,
// the two-clock read latency of the block ROM the original design used.
//
// The layout and sizes follow the original design, whose contents were
// traced offline from animated images. Those images are not part of this
// design, so the default contents are computed test figures: scene 0 a
// square, 1 a diamond, 2 a four-pointed star, 3 an octagon drawn dashed
// (every other side with the laser off). Each outline is split into
// 2^INSTR_BITS straight pieces, each written as a Bezier curve with its
// inner control points at 1/3 and 2/3 of the piece. The figure is centred
// on (2048, 2048) and its size pulses with the frame number:
// half-width = 60 * (6 + f) for f < 8 and 60 * (21 - f) after. Real
// contents can be loaded from a hex file through INIT_FILE.
module instruction_rom
  import rave_pkg::*;
#(
  parameter int unsigned SCENE_BITS = 2,
  parameter int unsigned FRAME_BITS = 4,
  parameter int unsigned INSTR_BITS = 8,
  parameter string       INIT_FILE  = "",
  parameter int unsigned ABITS      = SCENE_BITS + FRAME_BITS + INSTR_BITS
) (
  input  logic          clk,
  input  logic [ABITS-1:0] addr,
  output bezier_instr_t word
);
  localparam int unsigned DEPTH = 1 << ABITS;
  localparam int unsigned V     = (INSTR_BITS >= 3) ? 8 : 1;  // corners per outline

  // Outline corners in units of 1/10 of the half-width, walked in order.
  function automatic int corner(input int sc, input logic [2:0] k, input bit is_y);
    int cx, cy;
    unique case (sc % 4)
      0: begin  // square, each side split in two
        int sq_x[8] = '{-10, 0, 10, 10, 10, 0, -10, -10};
        int sq_y[8] = '{-10, -10, -10, 0, 10, 10, 10, 0};
        cx = sq_x[k]; cy = sq_y[k];
      end
      1: begin  // diamond, each side split in two
        int dm_x[8] = '{0, 5, 10, 5, 0, -5, -10, -5};
        int dm_y[8] = '{-10, -5, 0, 5, 10, 5, 0, -5};
        cx = dm_x[k]; cy = dm_y[k];
      end
      2: begin  // star
        int st_x[8] = '{0, 4, 10, 4, 0, -4, -10, -4};
        int st_y[8] = '{-10, -4, 0, 4, 10, 4, 0, -4};
        cx = st_x[k]; cy = st_y[k];
      end
      default: begin  // octagon
        int oc_x[8] = '{-4, 4, 10, 10, 4, -4, -10, -10};
        int oc_y[8] = '{-10, -10, -4, 4, 10, 10, 4, -4};
        cx = oc_x[k]; cy = oc_y[k];
      end
    endcase
    return is_y ? cy : cx;
  endfunction

  function automatic bezier_instr_t figure(input int unsigned a);
    int sc, frame, instr, per_edge, edge_i, piece, size;
    int ax, ay, bx, by, sx, sy, ex, ey;
    bezier_instr_t w;
    sc       = int'(a >> (FRAME_BITS + INSTR_BITS));
    frame    = int'((a >> INSTR_BITS) % (1 << FRAME_BITS));
    instr    = int'(a % (1 << INSTR_BITS));
    per_edge = (1 << INSTR_BITS) / V;
    edge_i   = instr / per_edge;
    piece    = instr % per_edge;
    size     = 60 * ((frame % 16) < 8 ? 6 + (frame % 16) : 21 - (frame % 16));
    ax = 2048 + size * corner(sc, 3'(edge_i), 1'b0) / 10;
    ay = 2048 + size * corner(sc, 3'(edge_i), 1'b1) / 10;
    bx = 2048 + size * corner(sc, 3'((edge_i + 1) % V), 1'b0) / 10;
    by = 2048 + size * corner(sc, 3'((edge_i + 1) % V), 1'b1) / 10;
    sx = ax + (bx - ax) * piece / per_edge;
    sy = ay + (by - ay) * piece / per_edge;
    ex = ax + (bx - ax) * (piece + 1) / per_edge;
    ey = ay + (by - ay) * (piece + 1) / per_edge;
    w.p0x = COORD_BITS'(sx);
    w.p0y = COORD_BITS'(sy);
    w.p1x = COORD_BITS'((2 * sx + ex) / 3);
    w.p1y = COORD_BITS'((2 * sy + ey) / 3);
    w.p2x = COORD_BITS'((sx + 2 * ex) / 3);
    w.p2y = COORD_BITS'((sy + 2 * ey) / 3);
    w.p3x = COORD_BITS'(ex);
    w.p3y = COORD_BITS'(ey);
    w.laser_on = ((sc % 4) != 3) || (edge_i % 2 == 0);
    return w;
  endfunction

  bezier_instr_t rom [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
    else for (int i = 0; i < DEPTH; i++) rom[i] = figure(i);
  end

  bezier_instr_t stage1;

  always_ff @(posedge clk) begin
    stage1 <= rom[addr];
    word   <= stage1;
  end
endmodule
