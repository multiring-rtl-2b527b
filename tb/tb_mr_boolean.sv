// tb_mr_boolean: exhaustive test of the Boolean module: every opcode with
// every pair of input bits, against a truth table written out here.
module tb_mr_boolean;
  import mr_pkg::*;

  mr_op_e op;
  logic   b1, b2, y;
  int     checks = 0, failures = 0;

  mr_boolean dut (.op(op), .b1(b1), .b2(b2), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected y for {b1,b2} = 00, 01, 10, 11 (index = {b1,b2})
    logic [3:0] tt;
    for (int o = 0; o < 16; o++) begin
      op = mr_op_e'(o);
      case (op)
        OP_AND:  tt = 4'b1000;
        OP_OR:   tt = 4'b1110;
        OP_NOT:  tt = 4'b0011;
        OP_COPY: tt = 4'b1100;
        default: tt = 4'b0000;
      endcase
      for (int i = 0; i < 4; i++) begin
        {b1, b2} = 2'(i);
        #1;
        checks++;
        if (y !== tt[i]) begin
          failures++;
          $display("op %0d b1=%0b b2=%0b: y=%0b expected %0b", o, b1, b2, y, tt[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
