// mr_pkg: types and constants shared by the MultiRing modules.
//
// MultiRing keeps a bit map of NUM_LAYERS mask layers in a ring memory and
// runs one of 16 basic instructions over the whole map in each ring cycle.
// This package holds the instruction encoding (the 16 opcodes in the order
// of the instruction table, 4-bit binary code chosen here), the host
// instruction word, and the control word that travels with every column
// through the processor pipeline.
package mr_pkg;

  // Four mask layers, as in the design's example configuration.
  localparam int unsigned NUM_LAYERS = 4;
  localparam int unsigned LAYER_W    = 2;

  // Register stages a column spends inside a unit processor: input
  // register, four output-stage delays and the output register.
  localparam int unsigned PROC_LAT = 6;

  typedef logic [LAYER_W-1:0] layer_t;

  typedef enum logic [3:0] {
    OP_AND    = 4'd0,
    OP_OR     = 4'd1,
    OP_NOT    = 4'd2,
    OP_COPY   = 4'd3,
    OP_SHR_NE = 4'd4,
    OP_SHR_NW = 4'd5,
    OP_SHR_SE = 4'd6,
    OP_SHR_SW = 4'd7,
    OP_EXP_NE = 4'd8,
    OP_EXP_NW = 4'd9,
    OP_EXP_SE = 4'd10,
    OP_EXP_SW = 4'd11,
    OP_INDTC  = 4'd12,
    OP_EXDTC  = 4'd13,
    OP_IN     = 4'd14,
    OP_OUT    = 4'd15
  } mr_op_e;

  // Instruction from the host: mr_f(src1[,src2], dest, paint).
  // mr-IN loads layer 'dest'; mr-OUT reads layer 'src1'.
  typedef struct packed {
    mr_op_e op;
    layer_t src1;
    layer_t src2;
    layer_t dest;
    logic   paint;   // 1: OR result into dest, 0: overwrite dest
  } mr_instr_t;

  // Control for one column entering the processor array.
  typedef struct packed {
    logic   wr_en;      // write the processor result back into 'dest'
    mr_op_e op;
    layer_t sel_c;      // 4x1 switch: layer for the 3x3 window
    layer_t sel_b1;     // 4x2 switch: first Boolean operand
    layer_t sel_b2;     // 4x2 switch: second Boolean operand
    layer_t dest;
    logic   paint;
    logic   first_col;  // column 0: left neighbour outside the map
    logic   last_col;   // last column: right neighbour outside the map
  } mr_ctl_t;

  // Three horizontally adjacent pixels of one row of the 3x3 window:
  // left neighbour column (m), current column (c), right neighbour (p).
  typedef struct packed {
    logic m;
    logic c;
    logic p;
  } mr_row3_t;

  // True for the opcodes whose result comes from the 3x3 window
  // (resizing and detection) rather than the Boolean module.
  function automatic logic is_window_op(mr_op_e op);
    return (op >= OP_SHR_NE) && (op <= OP_EXDTC);
  endfunction

endpackage
