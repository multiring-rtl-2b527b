// multiring: MultiRing design-rule-checking accelerator, top level.
//
// A bit map of NUM_LAYERS (4) mask layers, ROWS x COLS pixels, circulates
// in a ring memory: every row of every layer is a closed shift register of
// COLS bits. The ring passes through the I/O unit and then through a
// linear array of ROWS unit processors, one per row, which sees one column
// per clock and writes its result back into the stream. One trip around the
// ring (a ring cycle, COLS clocks) applies one basic instruction to the
// whole map. The instruction decoder takes instructions from the host and
// drives the I/O and processor control each clock.
//
// Ring: ring memory (COLS - PROC_LAT stages) -> I/O unit (no register) ->
// processor array (PROC_LAT stages) -> ring memory.
//
// Host interface: instructions on instr_*; bit-serial map data on sin_*
// (mr-IN) and sout_* (mr-OUT), column 0 first, row 0 first within a
// column. Each transfer is a valid/ready handshake.
// Timing: a processor instruction takes COLS clocks once column 0 reaches
// the processor; mr-IN and mr-OUT take COLS * (ROWS + 1) clocks when the
// host never waits. Array sizes are this design's choices.
module multiring
  import mr_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      instr_valid,
  input  mr_instr_t instr,
  output logic      instr_ready,
  output logic      busy,
  input  logic      sin_valid,
  input  logic      sin_data,
  output logic      sin_ready,
  output logic      sout_valid,
  output logic      sout_data,
  input  logic      sout_ready
);

  localparam int unsigned DEPTH = COLS - PROC_LAT;

  logic                            adv;
  mr_ctl_t                         ctl;
  layer_t                          io_layer;
  logic                            io_load, io_cap, io_shift;
  logic [NUM_LAYERS-1:0][ROWS-1:0] mem_out, io_out, pe_out;

  mr_controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .instr_valid (instr_valid),
    .instr       (instr),
    .instr_ready (instr_ready),
    .busy        (busy),
    .sin_valid   (sin_valid),
    .sin_ready   (sin_ready),
    .sout_valid  (sout_valid),
    .sout_ready  (sout_ready),
    .adv         (adv),
    .ctl         (ctl),
    .io_layer    (io_layer),
    .io_load     (io_load),
    .io_cap      (io_cap),
    .io_shift    (io_shift)
  );

  mr_ring_memory #(.ROWS(ROWS), .DEPTH(DEPTH)) u_ring (
    .clk     (clk),
    .rst_n   (rst_n),
    .adv     (adv),
    .col_in  (pe_out),
    .col_out (mem_out)
  );

  mr_io_unit #(.ROWS(ROWS)) u_io (
    .clk      (clk),
    .rst_n    (rst_n),
    .layer    (io_layer),
    .load_en  (io_load),
    .cap_en   (io_cap),
    .shift_en (io_shift),
    .sin      (sin_data),
    .sout     (sout_data),
    .col_in   (mem_out),
    .col_out  (io_out)
  );

  mr_processor_array #(.ROWS(ROWS)) u_pa (
    .clk     (clk),
    .rst_n   (rst_n),
    .adv     (adv),
    .ctl_in  (ctl),
    .col_in  (io_out),
    .col_out (pe_out)
  );

  if (COLS <= PROC_LAT) begin : g_bad_cols
    $error("COLS must exceed the processor latency");
  end

endmodule
