// mr_resize_detect: detection-resizing module of a unit processor.
//
// Works on the 3x3 window around the current pixel: row u is the upper
// neighbour row (north), c the current row, l the lower row (south); in
// each row m is the left (west) column, c the current and p the right
// (east) column.
//
// Resizing: an expansion grows a shape by one pixel in X and Y, placed
// towards the named corner; a shrink removes one pixel in X and Y from the
// opposite sides. EXP-NE therefore sets a pixel when it or its south, west
// or south-west neighbour is set, and SHR-NE keeps a pixel only when all
// four of those are set; the other three corners mirror this.
//
// Detection: INDTC flags a set pixel lying in a shape narrower than two
// pixels (vertically, horizontally, or along either diagonal); EXDTC flags
// a clear pixel in a gap narrower than two pixels. The four terms follow
// the design's interior- and exterior-detection equations.
//
// Combinational; output 0 for non-window opcodes.
module mr_resize_detect
  import mr_pkg::*;
(
  input  mr_op_e   op,
  input  mr_row3_t u,
  input  mr_row3_t c,
  input  mr_row3_t l,
  output logic     y
);

  logic indtc, exdtc;

  always_comb begin
    indtc = c.c & ((~u.c & ~l.c) |
                   (~c.m & ~c.p) |
                   (l.m & u.p & ~u.m & ~l.p) |
                   (u.m & l.p & ~l.m & ~u.p));
    exdtc = ~c.c & ((u.c & l.c) |
                    (c.m & c.p) |
                    (l.m & u.p & ~u.m & ~l.p) |
                    (u.m & l.p & ~l.m & ~u.p));
  end

  always_comb begin
    unique case (op)
      OP_SHR_NE: y = c.c & c.m & l.c & l.m;
      OP_SHR_NW: y = c.c & c.p & l.c & l.p;
      OP_SHR_SE: y = c.c & c.m & u.c & u.m;
      OP_SHR_SW: y = c.c & c.p & u.c & u.p;
      OP_EXP_NE: y = c.c | c.m | l.c | l.m;
      OP_EXP_NW: y = c.c | c.p | l.c | l.p;
      OP_EXP_SE: y = c.c | c.m | u.c | u.m;
      OP_EXP_SW: y = c.c | c.p | u.c | u.p;
      OP_INDTC:  y = indtc;
      OP_EXDTC:  y = exdtc;
      default:   y = 1'b0;
    endcase
  end

endmodule
