// tb_mr_processor_array: a small array (8 rows) processes whole bit maps of
// 12 columns, one instruction per map, back to back, with random gaps in
// adv. Each map is random; the expected map is computed here pixel by pixel
// over the whole 2-D map (rows above the first and below the last, and
// columns outside the map, read as 0) and compared column by column as the
// results leave the array six enabled clocks after entering.
module tb_mr_processor_array;
  import mr_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 12;
  localparam int NMAP = 60;

  logic                            clk = 0, rst_n = 0, adv = 0;
  mr_ctl_t                         ctl_in = '0;
  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in = '0, col_out;
  int                              checks = 0, failures = 0;

  mr_processor_array #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  bit      map_in  [NMAP][NUM_LAYERS][ROWS][COLS];
  bit      map_out [NMAP][NUM_LAYERS][ROWS][COLS];
  mr_instr_t ins   [NMAP];

  function automatic bit px(int m, int l, int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 1'b0;
    return map_in[m][l][r][c];
  endfunction

  function automatic bit result(int m, int r, int c);
    mr_instr_t i = ins[m];
    int s = i.src1;
    bit z = px(m, s, r, c), n = px(m, s, r-1, c), so = px(m, s, r+1, c);
    bit w = px(m, s, r, c-1), e = px(m, s, r, c+1);
    bit nw = px(m, s, r-1, c-1), ne = px(m, s, r-1, c+1);
    bit sw = px(m, s, r+1, c-1), se = px(m, s, r+1, c+1);
    case (i.op)
      OP_AND:    return z & px(m, i.src2, r, c);
      OP_OR:     return z | px(m, i.src2, r, c);
      OP_NOT:    return !z;
      OP_COPY:   return z;
      OP_SHR_NE: return z & so & w & sw;
      OP_SHR_NW: return z & so & e & se;
      OP_SHR_SE: return z & n & w & nw;
      OP_SHR_SW: return z & n & e & ne;
      OP_EXP_NE: return z | so | w | sw;
      OP_EXP_NW: return z | so | e | se;
      OP_EXP_SE: return z | n | w | nw;
      OP_EXP_SW: return z | n | e | ne;
      OP_INDTC:  return z & ((!n & !so) | (!w & !e) | (sw & ne & !nw & !se) | (nw & se & !sw & !ne));
      OP_EXDTC:  return !z & ((n & so) | (w & e) | (sw & ne & !nw & !se) | (nw & se & !sw & !ne));
      default:   return 1'b0;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, total;
    for (int m = 0; m < NMAP; m++) begin
      ins[m] = mr_instr_t'($urandom);
      ins[m].op = mr_op_e'(m % 14);
      for (int l = 0; l < NUM_LAYERS; l++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) map_in[m][l][r][c] = ($urandom % 3) != 0;
      for (int l = 0; l < NUM_LAYERS; l++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) map_out[m][l][r][c] = map_in[m][l][r][c];
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          map_out[m][ins[m].dest][r][c] = ins[m].paint ?
              (map_in[m][ins[m].dest][r][c] | result(m, r, c)) : result(m, r, c);
    end
    total = NMAP * COLS;
    e = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (e < total + 6) begin
      @(negedge clk);
      if (e >= 6) begin
        int j, m, c;
        j = e - 6;
        m = j / COLS;
        c = j % COLS;
        for (int l = 0; l < NUM_LAYERS; l++)
          for (int r = 0; r < ROWS; r++) begin
            checks++;
            if (col_out[l][r] !== map_out[m][l][r][c]) begin
              failures++;
              if (failures < 10)
                $display("map %0d op %0d layer %0d row %0d col %0d: %0b expected %0b",
                         m, ins[m].op, l, r, c, col_out[l][r], map_out[m][l][r][c]);
            end
          end
      end
      adv = ($urandom % 4) != 0;
      if (adv) begin
        if (e < total) begin
          int m, c;
          m = e / COLS;
          c = e % COLS;
          for (int l = 0; l < NUM_LAYERS; l++)
            for (int r = 0; r < ROWS; r++) col_in[l][r] = map_in[m][l][r][c];
          ctl_in = '{wr_en: 1'b1, op: ins[m].op, sel_c: ins[m].src1, sel_b1: ins[m].src1,
                     sel_b2: ins[m].src2, dest: ins[m].dest, paint: ins[m].paint,
                     first_col: (c == 0), last_col: (c == COLS - 1)};
        end else begin
          col_in = '0;
          ctl_in = '0;
        end
        e++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
