// tb_mr_resize_detect: every 3x3 window (512) under every opcode.
// Expected values come from a 3x3 array and the corner offsets of each
// resize direction, and from the four width/spacing patterns of the
// detection instructions, all written out here. A few hand-picked windows
// from the detection pattern figures are checked by name as well.
module tb_mr_resize_detect;
  import mr_pkg::*;

  mr_op_e   op;
  mr_row3_t u, c, l;
  logic     y;
  int       checks = 0, failures = 0;

  mr_resize_detect dut (.op(op), .u(u), .c(c), .l(l), .y(y));

  bit win [3][3];  // win[row][col], row 0 = north, col 0 = west

  function automatic bit expect_y(mr_op_e o);
    int dr, dc;
    bit any, all;
    case (o)
      OP_SHR_NE, OP_EXP_NE: begin dr = 2; dc = 0; end  // S and W neighbours
      OP_SHR_NW, OP_EXP_NW: begin dr = 2; dc = 2; end  // S and E
      OP_SHR_SE, OP_EXP_SE: begin dr = 0; dc = 0; end  // N and W
      default:              begin dr = 0; dc = 2; end  // N and E
    endcase
    any = win[1][1] | win[dr][1] | win[1][dc] | win[dr][dc];
    all = win[1][1] & win[dr][1] & win[1][dc] & win[dr][dc];
    case (o)
      OP_SHR_NE, OP_SHR_NW, OP_SHR_SE, OP_SHR_SW: return all;
      OP_EXP_NE, OP_EXP_NW, OP_EXP_SE, OP_EXP_SW: return any;
      OP_INDTC:
        return win[1][1] && ((!win[0][1] && !win[2][1]) || (!win[1][0] && !win[1][2]) ||
               (win[2][0] && win[0][2] && !win[0][0] && !win[2][2]) ||
               (win[0][0] && win[2][2] && !win[2][0] && !win[0][2]));
      OP_EXDTC:
        return !win[1][1] && ((win[0][1] && win[2][1]) || (win[1][0] && win[1][2]) ||
               (win[2][0] && win[0][2] && !win[0][0] && !win[2][2]) ||
               (win[0][0] && win[2][2] && !win[2][0] && !win[0][2]));
      default: return 1'b0;
    endcase
  endfunction

  task automatic drive(logic [8:0] bits);
    // bits[8:6] = north row W,C,E; bits[5:3] current; bits[2:0] south
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++) win[r][k] = bits[8 - 3*r - k];
    u = '{m: win[0][0], c: win[0][1], p: win[0][2]};
    c = '{m: win[1][0], c: win[1][1], p: win[1][2]};
    l = '{m: win[2][0], c: win[2][1], p: win[2][2]};
  endtask

  task automatic named(logic [8:0] bits, mr_op_e o, bit exp_y, string what);
    drive(bits);
    op = o;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("%s: y=%0b expected %0b", what, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++)
      for (int b = 0; b < 512; b++) begin
        drive(9'(b));
        op = mr_op_e'(o);
        #1;
        checks++;
        if (y !== expect_y(op)) begin
          failures++;
          if (failures < 10) $display("op %0d window %03x: y=%0b expected %0b", o, b, y, expect_y(op));
        end
      end
    // detection patterns: single-pixel line, diagonal pair, corner, wide area
    named(9'b000_010_000, OP_INDTC, 1'b1, "isolated pixel");
    named(9'b001_010_100, OP_INDTC, 1'b1, "diagonal width error");
    named(9'b000_011_011, OP_INDTC, 1'b0, "corner of a polygon");
    named(9'b000_110_110, OP_INDTC, 1'b0, "reported from a neighbour");
    named(9'b111_111_111, OP_INDTC, 1'b0, "interior");
    named(9'b111_101_111, OP_EXDTC, 1'b1, "one-pixel hole");
    named(9'b000_000_000, OP_EXDTC, 1'b0, "open space");
    // expansion towards NE grows from the south and west neighbours
    named(9'b000_000_010, OP_EXP_NE, 1'b1, "EXP-NE above a pixel");
    named(9'b010_000_000, OP_EXP_NE, 1'b0, "EXP-NE below a pixel");
    named(9'b000_111_111, OP_SHR_NE, 1'b1, "SHR-NE keeps north edge");
    named(9'b111_111_000, OP_SHR_NE, 1'b0, "SHR-NE removes south edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
