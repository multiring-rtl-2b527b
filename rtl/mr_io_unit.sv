// mr_io_unit: bit-serial host link of the ring memory.
//
// The host side is one bit wide; the ring side is one whole column of a
// layer (ROWS bits) at a time. A ROWS-bit shift register sits between them.
//   * mr-IN: the host shifts a column in (shift_en, row 0 first); when that
//     column passes, load_en replaces the selected layer's bits of the
//     passing column with the register, leaving the other layers alone.
//   * mr-OUT: cap_en copies the selected layer's bits of the passing column
//     into the register, which is then shifted out on sout, row 0 first.
// The I/O sits in the ring between the ring-memory output and the
// processor input (col_in -> col_out, combinational), so it sees every
// column once per ring cycle like the processor does.
//
// Timing: sout always shows register bit 0; one shift_en edge moves the
// next row there and takes sin into the top bit. A load or capture acts on
// the column present in that cycle. Ordering of rows and the placement of
// the I/O in the ring are this design's choices.
module mr_io_unit
  import mr_pkg::*;
#(
  parameter int unsigned ROWS = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  layer_t                          layer,
  input  logic                            load_en,
  input  logic                            cap_en,
  input  logic                            shift_en,
  input  logic                            sin,
  output logic                            sout,
  input  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in,
  output logic [NUM_LAYERS-1:0][ROWS-1:0] col_out
);

  logic [ROWS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (cap_en) begin
      sr <= col_in[layer];
    end else if (shift_en) begin
      sr <= {sin, sr[ROWS-1:1]};
    end
  end

  always_comb begin
    col_out = col_in;
    if (load_en) col_out[layer] = sr;
  end

  assign sout = sr[0];

  // A column cannot be loaded and captured in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(load_en && cap_en));

endmodule
