// tb_multiring: end-to-end test of the MultiRing top at its default size.
//
// Plays the host. Loads bit maps through the serial mr-IN path, runs random
// instruction streams of all fourteen processor instructions in write and
// paint mode, runs the four design-rule-check procedures (width, intra-layer
// spacing, inter-layer spacing, extension) on two generated mask layers,
// reads layers back through mr-OUT and compares every pixel with a
// reference model of the instruction set kept in this testbench.
// The host inserts random gaps on both serial handshakes, so the ring is
// stopped by the host as well as by the I/O protocol.
// Also checked: one processor instruction per ring cycle (COLS clocks
// between back-to-back instructions) and COLS*(ROWS+1) clocks for a
// stall-free mr-IN and mr-OUT. Each mechanism is counted and a mechanism
// that never happened counts as a failure.
module tb_multiring;
  import mr_pkg::*;

  localparam int ROWS = 64;
  localparam int COLS = 64;
  localparam int LA = 0;  // layer A
  localparam int LB = 1;  // layer B

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      instr_valid = 1'b0;
  mr_instr_t instr;
  logic      instr_ready, busy;
  logic      sin_valid = 1'b0, sin_data = 1'b0, sin_ready;
  logic      sout_valid, sout_data, sout_ready = 1'b0;

  multiring dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference model
  bit ref_m [NUM_LAYERS][ROWS][COLS];
  bit gold_a [ROWS][COLS];
  bit gold_b [ROWS][COLS];

  // mechanism counters
  int op_seen [16];
  int n_paint = 0, n_write = 0, n_back2back = 0, n_align_wait = 0;
  int n_host_in_gap = 0, n_host_out_gap = 0, n_ring_stall = 0, n_edge = 0;

  // last accepted instruction, for the ring-cycle check
  longint last_accept = -1;
  bit     last_was_proc = 0;
  bit     last_waited = 0;    // previous instruction waited for column 0
  bit     strict_gaps = 0;  // when set, host never inserts gaps

  always @(posedge clk) begin
    if (rst_n && !dut.adv) n_ring_stall++;
    if (rst_n && busy && dut.u_ctrl.state == dut.u_ctrl.S_WAIT) n_align_wait++;
  end

  initial begin
    #(10 * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit px(int l, int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 1'b0;
    return ref_m[l][r][c];
  endfunction

  // Reference result of a window operation at (r, c) of layer l.
  // North is row r-1, east is column c+1.
  function automatic bit ref_window(mr_op_e op, int l, int r, int c);
    int dr, dc;  // neighbours used: rows {r, r+dr}, columns {c, c+dc}
    bit any, all;
    bit n, s, e, w, ne, nw, se, sw, z;
    case (op)
      OP_SHR_NE, OP_EXP_NE: begin dr = 1;  dc = -1; end  // use south, west
      OP_SHR_NW, OP_EXP_NW: begin dr = 1;  dc = 1;  end  // south, east
      OP_SHR_SE, OP_EXP_SE: begin dr = -1; dc = -1; end  // north, west
      default:              begin dr = -1; dc = 1;  end  // north, east
    endcase
    any = px(l, r, c) | px(l, r+dr, c) | px(l, r, c+dc) | px(l, r+dr, c+dc);
    all = px(l, r, c) & px(l, r+dr, c) & px(l, r, c+dc) & px(l, r+dr, c+dc);
    z  = px(l, r, c);
    n  = px(l, r-1, c);   s  = px(l, r+1, c);
    w  = px(l, r, c-1);   e  = px(l, r, c+1);
    nw = px(l, r-1, c-1); ne = px(l, r-1, c+1);
    sw = px(l, r+1, c-1); se = px(l, r+1, c+1);
    case (op)
      OP_SHR_NE, OP_SHR_NW, OP_SHR_SE, OP_SHR_SW: return all;
      OP_EXP_NE, OP_EXP_NW, OP_EXP_SE, OP_EXP_SW: return any;
      OP_INDTC: return z && ((!n && !s) || (!w && !e) ||
                             (sw && ne && !nw && !se) || (nw && se && !sw && !ne));
      OP_EXDTC: return !z && ((n && s) || (w && e) ||
                              (sw && ne && !nw && !se) || (nw && se && !sw && !ne));
      default:  return 1'b0;
    endcase
  endfunction

  task automatic ref_apply(mr_op_e op, int s1, int s2, int d, bit p);
    bit res [ROWS][COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        case (op)
          OP_AND:  res[r][c] = ref_m[s1][r][c] & ref_m[s2][r][c];
          OP_OR:   res[r][c] = ref_m[s1][r][c] | ref_m[s2][r][c];
          OP_NOT:  res[r][c] = !ref_m[s1][r][c];
          OP_COPY: res[r][c] = ref_m[s1][r][c];
          default: res[r][c] = ref_window(op, s1, r, c);
        endcase
      end
    if (is_window_op(op)) begin
      bit edge_set = 0;
      for (int i = 0; i < ROWS; i++)
        edge_set |= ref_m[s1][i][0] | ref_m[s1][i][COLS-1];
      for (int i = 0; i < COLS; i++)
        edge_set |= ref_m[s1][0][i] | ref_m[s1][ROWS-1][i];
      if (edge_set) n_edge++;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        ref_m[d][r][c] = p ? (ref_m[d][r][c] | res[r][c]) : res[r][c];
  endtask

  // Offer an instruction; returns after the clock edge that takes it.
  task automatic send(mr_op_e op, int s1, int s2, int d, bit p);
    bit was_busy;
    @(negedge clk);
    instr_valid = 1'b1;
    instr = '{op: op, src1: layer_t'(s1), src2: layer_t'(s2), dest: layer_t'(d), paint: p};
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    was_busy = busy;
    @(posedge clk);
    #1;
    instr_valid = 1'b0;
    op_seen[op]++;
    if (op != OP_IN && op != OP_OUT) begin
      if (p) n_paint++; else n_write++;
      if (was_busy && last_was_proc && !last_waited) begin
        n_back2back++;
        checks++;
        if (cycle - last_accept != COLS) begin
          failures++;
          $display("ring cycle: %0d clocks between instructions, expected %0d",
                   cycle - last_accept, COLS);
        end
      end
      ref_apply(op, s1, s2, d, p);
    end
    last_accept   = cycle;
    last_waited   = (dut.u_ctrl.state == dut.u_ctrl.S_WAIT);
    last_was_proc = (op != OP_IN && op != OP_OUT);
  endtask

  // Shift the bits of one bit map into layer d (mr-IN).
  task automatic load_layer(int d, const ref bit img [ROWS][COLS]);
    int c = 0, r = 0;
    send(OP_IN, 0, 0, d, 1'b0);
    while (c < COLS) begin
      @(negedge clk);
      sin_valid = strict_gaps ? 1'b1 : (($urandom % 4) != 0);
      sin_data  = img[r][c];
      #1;
      if (!sin_valid && sin_ready) n_host_in_gap++;
      if (sin_valid && sin_ready) begin
        if (r == ROWS - 1) begin r = 0; c++; end
        else r++;
      end
    end
    @(negedge clk);
    sin_valid = 1'b0;
    for (int rr = 0; rr < ROWS; rr++)
      for (int cc = 0; cc < COLS; cc++) ref_m[d][rr][cc] = img[rr][cc];
  endtask

  // Read layer s back (mr-OUT) and compare with the model.
  task automatic check_layer(int s, string what);
    int c = 0, r = 0, bad = 0;
    send(OP_OUT, s, 0, 0, 1'b0);
    while (c < COLS) begin
      @(negedge clk);
      sout_ready = strict_gaps ? 1'b1 : (($urandom % 4) != 0);
      #1;
      if (sout_valid && !sout_ready) n_host_out_gap++;
      if (sout_valid && sout_ready) begin
        checks++;
        if (sout_data !== ref_m[s][r][c]) begin
          failures++;
          if (bad++ < 5)
            $display("%s: layer %0d row %0d col %0d is %0b, expected %0b",
                     what, s, r, c, sout_data, ref_m[s][r][c]);
        end
        if (r == ROWS - 1) begin r = 0; c++; end
        else r++;
      end
    end
    @(negedge clk);
    sout_ready = 1'b0;
  endtask

  // Count clocks of a stall-free mr-IN or mr-OUT.
  int io_clocks = 0;
  bit count_io = 0;
  always @(posedge clk)
    if (count_io && (sin_ready || dut.io_load || sout_valid || dut.io_cap)) io_clocks++;

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // Generated test layers: rectangles of random size, some on the map edge,
  // some one or two pixels wide, some touching diagonally.
  task automatic make_layers();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        gold_a[r][c] = 0;
        gold_b[r][c] = 0;
      end
    for (int k = 0; k < 14; k++) begin
      int r0 = $urandom % ROWS, c0 = $urandom % COLS;
      int h = 1 + $urandom % 7, w = 1 + $urandom % 9;
      for (int r = r0; r < r0 + h && r < ROWS; r++)
        for (int c = c0; c < c0 + w && c < COLS; c++) gold_a[r][c] = 1;
    end
    for (int k = 0; k < 10; k++) begin
      int r0 = $urandom % ROWS, c0 = $urandom % COLS;
      int h = 1 + $urandom % 9, w = 1 + $urandom % 6;
      for (int r = r0; r < r0 + h && r < ROWS; r++)
        for (int c = c0; c < c0 + w && c < COLS; c++) gold_b[r][c] = 1;
    end
    // a shape on every edge of the map
    for (int c = 10; c < 20; c++) begin gold_a[0][c] = 1; gold_a[ROWS-1][c] = 1; end
    for (int r = 30; r < 36; r++) begin gold_a[r][0] = 1; gold_a[r][COLS-1] = 1; end
    // two squares meeting at a corner (diagonal width case)
    gold_a[20][40] = 1; gold_a[20][41] = 1; gold_a[21][40] = 1; gold_a[21][41] = 1;
    gold_a[22][42] = 1; gold_a[22][43] = 1; gold_a[23][42] = 1; gold_a[23][43] = 1;
  endtask

  task automatic load_ab();
    load_layer(LA, gold_a);
    load_layer(LB, gold_b);
  endtask

  // The design-rule-check procedures, as instruction sequences.
  task automatic width_rule_check(int a, int n);
    send(OP_INDTC, a, 0, 3, 1'b0);
    send(OP_COPY, a, 0, 2, 1'b0);
    for (int i = 1; i <= n - 2; i++) begin
      send(OP_SHR_NE, 2, 0, 2, 1'b0);
      send(OP_INDTC, 2, 0, 3, 1'b1);
    end
  endtask

  task automatic space_rule_check_1(int a, int n);
    send(OP_EXDTC, a, 0, 3, 1'b0);
    send(OP_COPY, a, 0, 2, 1'b0);
    for (int i = 1; i <= n - 2; i++) begin
      send(OP_EXP_NE, 2, 0, 2, 1'b0);
      send(OP_EXDTC, 2, 0, 3, 1'b1);
    end
  endtask

  task automatic space_rule_check_2(int a, int b, int n);
    send(OP_EXP_NE, a, 0, a, 1'b0);
    send(OP_EXP_NE, b, 0, b, 1'b0);
    send(OP_AND, a, b, 2, 1'b0);
    send(OP_INDTC, 2, 0, 3, 1'b0);
    for (int i = 1; i <= n - 1; i++) begin
      send(OP_EXP_NE, a, 0, a, 1'b0);
      send(OP_EXP_NE, b, 0, b, 1'b0);
    end
    for (int i = 1; i <= n; i++) begin
      send(OP_SHR_SW, a, 0, a, 1'b0);
      send(OP_SHR_SW, b, 0, b, 1'b0);
    end
    send(OP_OR, a, b, 2, 1'b0);
    space_rule_check_1(2, n);
  endtask

  task automatic extension_rule_check(int a, int b, int n);
    send(OP_EXP_NE, b, 0, b, 1'b0);
    send(OP_EXP_SW, b, 0, b, 1'b0);
    send(OP_NOT, a, 0, a, 1'b0);
    send(OP_AND, b, a, 2, 1'b0);
    width_rule_check(2, n + 1);
  endtask

  task automatic check_all(string what);
    for (int l = 0; l < NUM_LAYERS; l++) check_layer(l, what);
  endtask

  bit rnd_img [ROWS][COLS];

  initial begin
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. stall-free load and read-back, with clock counts
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) rnd_img[r][c] = $urandom % 2;
    strict_gaps = 1;
    count_io = 1; io_clocks = 0;
    load_layer(2, rnd_img);
    wait_idle();
    count_io = 0;
    checks++;
    if (io_clocks != COLS * (ROWS + 1)) begin
      failures++;
      $display("mr-IN took %0d clocks, expected %0d", io_clocks, COLS * (ROWS + 1));
    end
    count_io = 1; io_clocks = 0;
    check_layer(2, "stall-free read");
    wait_idle();
    count_io = 0;
    checks++;
    if (io_clocks != COLS * (ROWS + 1)) begin
      failures++;
      $display("mr-OUT took %0d clocks, expected %0d", io_clocks, COLS * (ROWS + 1));
    end
    strict_gaps = 0;

    // 2. random instruction streams over random maps
    for (int l = 0; l < NUM_LAYERS; l++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) rnd_img[r][c] = ($urandom % 3) != 0;
      load_layer(l, rnd_img);
    end
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < 40; k++) begin
        mr_op_e op;
        op = mr_op_e'(k % 14);
        send(op, $urandom % 4, $urandom % 4, $urandom % 4, $urandom % 2);
      end
      check_all("random stream");
    end

    // 3. design-rule checks on two generated layers
    make_layers();
    load_ab();
    width_rule_check(LA, 3);
    check_layer(3, "width rule A");
    load_ab();
    space_rule_check_1(LA, 3);
    check_layer(3, "spacing rule A");
    load_ab();
    space_rule_check_2(LA, LB, 3);
    check_layer(3, "spacing rule A-B");
    load_ab();
    extension_rule_check(LA, LB, 2);
    check_layer(3, "extension rule");
    check_all("after extension rule");
    wait_idle();

    // mechanisms that must have happened
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("opcode %0d never ran", i); end
    end
    checks++; if (n_paint == 0)        begin failures++; $display("no paint-mode run"); end
    checks++; if (n_write == 0)        begin failures++; $display("no write-mode run"); end
    checks++; if (n_back2back == 0)    begin failures++; $display("no back-to-back run"); end
    checks++; if (n_align_wait == 0)   begin failures++; $display("no alignment wait"); end
    checks++; if (n_host_in_gap == 0)  begin failures++; $display("no host input gap"); end
    checks++; if (n_host_out_gap == 0) begin failures++; $display("no host output gap"); end
    checks++; if (n_ring_stall == 0)   begin failures++; $display("ring never stopped"); end
    checks++; if (n_edge == 0)         begin failures++; $display("no map-edge window"); end
    $display("back-to-back=%0d paint=%0d write=%0d align_wait=%0d in_gaps=%0d out_gaps=%0d stalls=%0d edges=%0d",
             n_back2back, n_paint, n_write, n_align_wait, n_host_in_gap, n_host_out_gap,
             n_ring_stall, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
