// mr_dyn_shift_cell: behavioural model of one dynamic shift-register cell,
// the memory cell proposed for building the ring memory in silicon.
//
// The cell is a pass transistor clocked by phi1, an inverter, a pass
// transistor clocked by phi2 and a second inverter. While phi1 is high the
// input charges the gate of the first inverter; while phi2 is high the
// first inverter's output charges the gate of the second. Each gate keeps
// its charge while its pass transistor is off, so a cell holds one bit and
// moves it one position per phi1/phi2 clock pair; the two inversions cancel.
// phi1 and phi2 must never be high together (two-phase non-overlapping
// clock), which the model asserts. Charge leakage is not modelled: the
// clocks must keep running, as they do in a ring that never stops. The
// inverter delay INV_DELAY is this model's choice. Not synthesizable logic:
// it stands for a transistor-level cell, not for gates. The two latches a
// synthesis tool infers from it are intended: they are the two charge
// storage nodes of the cell.
module mr_dyn_shift_cell #(
  parameter int unsigned INV_DELAY = 1
) (
  input  logic phi1,
  input  logic phi2,
  input  logic d,
  output logic q
);

  logic gate1;   // charge on the first inverter's gate
  logic gate2;   // charge on the second inverter's gate
  logic inv1;

  always_latch begin
    if (phi1) gate1 = d;
  end

  assign #(INV_DELAY) inv1 = ~gate1;

  always_latch begin
    if (phi2) gate2 = inv1;
  end

  assign #(INV_DELAY) q = ~gate2;

  always @(phi1 or phi2) begin
    assert (!(phi1 && phi2)) else $error("phi1 and phi2 overlap");
  end

endmodule
