// mr_boolean: the Boolean module of a unit processor.
//
// Combines the two pixels B1 and B2 picked by the 4x2 switch: AND, OR,
// NOT (of B1) and COPY (of B1), the four inter-layer Boolean instructions.
// For any other opcode the output is 0 (the 2x1 switch then takes the
// window result instead). Purely combinational; the unit processor
// registers the result. The four operations are the published ones; the
// gate-level form is the simplest that does them.
module mr_boolean
  import mr_pkg::*;
(
  input  mr_op_e op,
  input  logic   b1,
  input  logic   b2,
  output logic   y
);

  always_comb begin
    unique case (op)
      OP_AND:  y = b1 & b2;
      OP_OR:   y = b1 | b2;
      OP_NOT:  y = ~b1;
      OP_COPY: y = b1;
      default: y = 1'b0;
    endcase
  end

endmodule
