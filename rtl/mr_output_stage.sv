// mr_output_stage: output stage of a unit processor.
//
// The four layer bits C1..C4 of a column pass through a four-clock delay
// line so that they line up with the processor result Po, which needs four
// clocks to be computed from the same column. The destination layer then
// receives either Po ("write") or Po ORed with its old bit ("paint"); the
// other layers pass unchanged. The merged bits are registered and go back
// to the ring memory.
//
// Timing: c_in sampled at an enabled clock edge reappears on c_out five
// enabled edges later (four delay stages plus the output register). po,
// wr_en, dest and paint must belong to the column in the last delay stage,
// i.e. be presented four enabled edges after that column's c_in. Every
// register advances only when adv is high, because the stage is part of
// the ring and stops with it.
module mr_output_stage
  import mr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adv,
  input  logic [NUM_LAYERS-1:0] c_in,
  input  logic                  po,
  input  logic                  wr_en,
  input  layer_t                dest,
  input  logic                  paint,
  output logic [NUM_LAYERS-1:0] c_out
);

  localparam int unsigned DELAY = 4;

  logic [DELAY-1:0][NUM_LAYERS-1:0] dly;
  logic [NUM_LAYERS-1:0]            merged;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0;
    end else if (adv) begin
      dly[0] <= c_in;
      for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    merged = dly[DELAY-1];
    if (wr_en) merged[dest] = paint ? (dly[DELAY-1][dest] | po) : po;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   c_out <= '0;
    else if (adv) c_out <= merged;
  end

endmodule
