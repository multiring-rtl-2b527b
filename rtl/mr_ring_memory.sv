// mr_ring_memory: the multiple ring memory.
//
// NUM_LAYERS planes of ROWS rows; each row of each plane is a shift
// register DEPTH bits long. The column leaving the last stage goes to the
// I/O and processor side, and the column coming back from the processor
// enters the first stage, so together with the PROC_LAT stages inside the
// processor each row forms a closed ring of DEPTH + PROC_LAT bits, one bit
// per bit-map column. All planes shift together, one column per enabled
// clock, and never need an address.
//
// Interface: col_in is written into stage 0 and col_out is the last stage,
// both indexed [layer][row]. Timing: a column entering at an enabled edge
// reaches col_out DEPTH enabled edges later; nothing moves while adv is low.
// The document suggests two-phase dynamic shift registers for this memory
// (see mr_dyn_shift_cell); this RTL uses edge-triggered flip-flops with a
// shift enable and a reset to zero, which are this design's choices.
module mr_ring_memory
  import mr_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned DEPTH = 58
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            adv,
  input  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in,
  output logic [NUM_LAYERS-1:0][ROWS-1:0] col_out
);

  logic [DEPTH-1:0][NUM_LAYERS-1:0][ROWS-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (adv) begin
      mem[0] <= col_in;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign col_out = mem[DEPTH-1];

endmodule
