// tb_mr_unit_processor: one unit processor fed a random stream of columns,
// control words and neighbour windows, with random gaps in adv.
// A model kept here rebuilds each column's 3x3 window from the stream
// (left/right neighbours from the previous/next column, edges cleared by
// the first/last-column flags), evaluates the instruction and checks:
//   * win_out two enabled clocks after a column entered,
//   * c_out six enabled clocks after a column entered.
module tb_mr_unit_processor;
  import mr_pkg::*;

  logic                  clk = 0, rst_n = 0, adv = 0;
  mr_ctl_t               ctl_in = '0;
  logic [NUM_LAYERS-1:0] c_in = '0, c_out;
  mr_row3_t              win_out, up_win = '0, lo_win = '0;
  int                    checks = 0, failures = 0;

  mr_unit_processor dut (.*);

  always #5 clk = ~clk;

  localparam int N = 3000;
  logic [NUM_LAYERS-1:0] in_h [N];
  mr_ctl_t               ctl_h [N];
  mr_row3_t              up_h [N], lo_h [N];

  function automatic bit sel(int e, layer_t k);
    return in_h[e][k];
  endfunction

  function automatic mr_row3_t own_window(int j);
    mr_row3_t w;
    w.m = sel(j - 1, ctl_h[j-1].sel_c) & ~ctl_h[j].first_col;
    w.c = sel(j, ctl_h[j].sel_c);
    w.p = sel(j + 1, ctl_h[j+1].sel_c) & ~ctl_h[j].last_col;
    return w;
  endfunction

  function automatic bit window_result(mr_op_e op, mr_row3_t u, mr_row3_t c, mr_row3_t l);
    // expansion/shrink use the current pixel and the neighbours on the side
    // opposite to the named corner
    bit v, h, d;
    case (op)
      OP_SHR_NE, OP_EXP_NE: begin v = l.c; h = c.m; d = l.m; end
      OP_SHR_NW, OP_EXP_NW: begin v = l.c; h = c.p; d = l.p; end
      OP_SHR_SE, OP_EXP_SE: begin v = u.c; h = c.m; d = u.m; end
      default:              begin v = u.c; h = c.p; d = u.p; end
    endcase
    case (op)
      OP_SHR_NE, OP_SHR_NW, OP_SHR_SE, OP_SHR_SW: return c.c & v & h & d;
      OP_EXP_NE, OP_EXP_NW, OP_EXP_SE, OP_EXP_SW: return c.c | v | h | d;
      OP_INDTC: return c.c & ((!u.c & !l.c) | (!c.m & !c.p) |
                              (l.m & u.p & !u.m & !l.p) | (u.m & l.p & !l.m & !u.p));
      default:  return !c.c & ((u.c & l.c) | (c.m & c.p) |
                               (l.m & u.p & !u.m & !l.p) | (u.m & l.p & !l.m & !u.p));
    endcase
  endfunction

  function automatic logic [NUM_LAYERS-1:0] expect_out(int j);
    mr_ctl_t k = ctl_h[j];
    bit po, b1, b2;
    logic [NUM_LAYERS-1:0] o = in_h[j];
    b1 = in_h[j][k.sel_b1];
    b2 = in_h[j][k.sel_b2];
    case (k.op)
      OP_AND:  po = b1 & b2;
      OP_OR:   po = b1 | b2;
      OP_NOT:  po = !b1;
      OP_COPY: po = b1;
      default: po = window_result(k.op, up_h[j+3], own_window(j), lo_h[j+3]);
    endcase
    if (k.wr_en) o[k.dest] = k.paint ? (o[k.dest] | po) : po;
    return o;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_window_ops = 0;

  initial begin
    int e;
    e = 0;
    for (int i = 0; i < N; i++) begin
      in_h[i] = NUM_LAYERS'($urandom);
      ctl_h[i] = mr_ctl_t'($urandom);
      ctl_h[i].op = mr_op_e'($urandom % 14);
      up_h[i] = mr_row3_t'($urandom);
      lo_h[i] = mr_row3_t'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (e < N - 4) begin
      @(negedge clk);
      // e enabled edges have happened; the last was edge e-1
      if (e >= 8) begin
        int j;
        j = e - 1 - 5;
        checks++;
        if (c_out !== expect_out(j)) begin
          failures++;
          if (failures < 10)
            $display("column %0d op %0d: c_out=%b expected %b", j, ctl_h[j].op, c_out, expect_out(j));
        end
        if (is_window_op(ctl_h[j].op)) n_window_ops++;
        j = e - 1 - 2;
        checks++;
        if (win_out !== own_window(j)) begin
          failures++;
          if (failures < 10) $display("column %0d: window %b expected %b", j, win_out, own_window(j));
        end
      end
      adv = ($urandom % 5) != 0;
      if (adv) begin
        c_in   = in_h[e];
        ctl_in = ctl_h[e];
        up_win = up_h[e];
        lo_win = lo_h[e];
        e++;
      end else begin
        c_in   = NUM_LAYERS'($urandom);
        up_win = up_h[e];
        lo_win = lo_h[e];
      end
    end
    checks++;
    if (n_window_ops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
