// mr_unit_processor: the processor for one row of the bit map.
//
// Each enabled clock one column of the ring memory enters: the four layer
// bits C1..C4 of this row. Inside:
//   * 4x1 switch: picks layer sel_c; its bits go through a three-stage
//     shift register C+ -> C0 -> C- so that C0 is the current pixel, C+ the
//     column after it (east) and C- the column before it (west). With the
//     same three bits of the upper and lower neighbour rows this forms the
//     3x3 window for the detection-resizing module.
//   * 4x2 switch: picks layers sel_b1 and sel_b2 as Boolean operands B1, B2.
//   * 2x1 switch: takes the window result for resizing/detection opcodes
//     and the Boolean result otherwise; its registered output is Po.
//   * output stage: delays C1..C4 four clocks and writes or paints Po into
//     the destination layer.
// The window bits leaving the map (C- of the first column, C+ of the last)
// are forced to 0, both for this row and in the copy sent to the
// neighbours, so the map does not wrap around.
//
// Timing: a column presented on c_in (with its control word ctl_in) at an
// enabled edge leaves on c_out PROC_LAT = 6 enabled edges later. The
// window of a column is complete two enabled edges after it entered; the
// neighbour windows up_win/lo_win must be in that same phase (they are when
// all rows get the same control stream). Every register advances only on
// adv, since the processor is part of the ring. The pipeline registers and
// the control word carried with each column are this design's choices;
// the switches, window register and four-clock output delay follow the
// unit-processor block diagram.
module mr_unit_processor
  import mr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adv,
  input  mr_ctl_t               ctl_in,
  input  logic [NUM_LAYERS-1:0] c_in,
  output logic [NUM_LAYERS-1:0] c_out,
  output mr_row3_t              win_out,
  input  mr_row3_t              up_win,
  input  mr_row3_t              lo_win
);

  logic [NUM_LAYERS-1:0] c_s0;          // input register C1..C4
  mr_ctl_t               ctl0, ctl1, ctl2, ctl3, ctl4;
  logic                  w_p, w_0, w_m; // C+, C0, C-
  logic                  bool_y, bool1, bool2, bool3;
  logic                  geo_y, geo3;
  logic                  po4;
  mr_row3_t              own_win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_s0  <= '0;
      ctl0  <= '0;
      ctl1  <= '0;
      ctl2  <= '0;
      ctl3  <= '0;
      ctl4  <= '0;
      w_p   <= 1'b0;
      w_0   <= 1'b0;
      w_m   <= 1'b0;
      bool1 <= 1'b0;
      bool2 <= 1'b0;
      bool3 <= 1'b0;
      geo3  <= 1'b0;
      po4   <= 1'b0;
    end else if (adv) begin
      c_s0  <= c_in;
      ctl0  <= ctl_in;
      // 4x1 switch into the window shift register
      w_p   <= c_s0[ctl0.sel_c];
      w_0   <= w_p;
      w_m   <= w_0;
      ctl1  <= ctl0;
      ctl2  <= ctl1;
      // Boolean path, delayed to meet the window path
      bool1 <= bool_y;
      bool2 <= bool1;
      bool3 <= bool2;
      // window path
      geo3  <= geo_y;
      ctl3  <= ctl2;
      // 2x1 switch
      po4   <= is_window_op(ctl3.op) ? geo3 : bool3;
      ctl4  <= ctl3;
    end
  end

  // Window of the current column, with the map's left/right edges cleared.
  always_comb begin
    own_win.m = w_m & ~ctl2.first_col;
    own_win.c = w_0;
    own_win.p = w_p & ~ctl2.last_col;
  end
  assign win_out = own_win;

  // 4x2 switch and Boolean module
  mr_boolean u_bool (
    .op (ctl0.op),
    .b1 (c_s0[ctl0.sel_b1]),
    .b2 (c_s0[ctl0.sel_b2]),
    .y  (bool_y)
  );

  mr_resize_detect u_geo (
    .op (ctl2.op),
    .u  (up_win),
    .c  (own_win),
    .l  (lo_win),
    .y  (geo_y)
  );

  mr_output_stage u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .adv   (adv),
    .c_in  (c_s0),
    .po    (po4),
    .wr_en (ctl4.wr_en),
    .dest  (ctl4.dest),
    .paint (ctl4.paint),
    .c_out (c_out)
  );

endmodule
