// mr_processor_array: the linear processor array.
//
// One unit processor per bit-map row, all driven by the same control word,
// so every row runs the same instruction on the same column at once. Each
// processor passes its three window bits (C-, C0, C+) to the rows above
// and below, which see them as their L and U bits. Row 0 is the top
// (north) row: it has no upper neighbour, and the last row has no lower
// neighbour; the missing window rows read as 0 (the published design only
// says these two rows differ from the inner ones).
//
// Interface: col_in/col_out carry one ring-memory column, indexed
// [layer][row]. Timing: a column entering with ctl_in at an enabled edge
// comes out PROC_LAT enabled edges later (see mr_unit_processor).
module mr_processor_array
  import mr_pkg::*;
#(
  parameter int unsigned ROWS = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            adv,
  input  mr_ctl_t                         ctl_in,
  input  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in,
  output logic [NUM_LAYERS-1:0][ROWS-1:0] col_out
);

  mr_row3_t win [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [NUM_LAYERS-1:0] c_in_r, c_out_r;
    mr_row3_t              up_r, lo_r;

    for (genvar k = 0; k < NUM_LAYERS; k++) begin : g_layer
      assign c_in_r[k]     = col_in[k][r];
      assign col_out[k][r] = c_out_r[k];
    end

    if (r == 0) begin : g_top
      assign up_r = '0;
    end else begin : g_up
      assign up_r = win[r-1];
    end
    if (r == ROWS - 1) begin : g_bottom
      assign lo_r = '0;
    end else begin : g_lo
      assign lo_r = win[r+1];
    end

    mr_unit_processor u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .adv     (adv),
      .ctl_in  (ctl_in),
      .c_in    (c_in_r),
      .c_out   (c_out_r),
      .win_out (win[r]),
      .up_win  (up_r),
      .lo_win  (lo_r)
    );
  end

endmodule
