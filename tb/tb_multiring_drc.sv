// tb_multiring_drc: the four design-rule-check programs run on MultiRing at
// its default size, on hand-drawn layouts whose errors are known in
// advance (no reference model: each case is legal or illegal by
// construction).
//   * 3-lambda width rule on layer A: 1- and 2-wide bars, and two 2x2
//     squares touching at a corner, must be reported; a 3-wide bar and a
//     5x5 square must not.
//   * 3-lambda spacing rule on layer A: gaps of 1 and 2 between bars must be
//     reported, in both directions; a gap of 3 must not.
//   * 3-lambda spacing between layers A and B: a gap of 2 must be reported,
//     a gap of 3 must not.
//   * 2-lambda extension of layer B over layer A: a B bar sticking out by 1
//     must be reported, one sticking out by 4 must not.
// The program for each rule is the instruction sequence of the rule, sent
// one instruction at a time; the error layer is read back over mr-OUT.
module tb_multiring_drc;
  import mr_pkg::*;

  localparam int ROWS = 64;
  localparam int COLS = 64;
  localparam int LA = 0;
  localparam int LB = 1;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      instr_valid = 1'b0;
  mr_instr_t instr = '0;
  logic      instr_ready, busy;
  logic      sin_valid = 1'b0, sin_data = 1'b0, sin_ready;
  logic      sout_valid, sout_data, sout_ready = 1'b0;

  multiring dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit img_a [ROWS][COLS];
  bit img_b [ROWS][COLS];
  bit res   [ROWS][COLS];

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(mr_op_e op, int s1, int s2, int d, bit p);
    @(negedge clk);
    instr_valid = 1'b1;
    instr = '{op: op, src1: layer_t'(s1), src2: layer_t'(s2), dest: layer_t'(d), paint: p};
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    instr_valid = 1'b0;
  endtask

  task automatic load_layer(int d, const ref bit img [ROWS][COLS]);
    int c = 0, r = 0;
    send(OP_IN, 0, 0, d, 1'b0);
    while (c < COLS) begin
      @(negedge clk);
      sin_valid = 1'b1;
      sin_data  = img[r][c];
      #1;
      if (sin_ready) begin
        if (r == ROWS - 1) begin r = 0; c++; end
        else r++;
      end
    end
    @(negedge clk);
    sin_valid = 1'b0;
  endtask

  task automatic read_layer(int s);
    int c = 0, r = 0;
    send(OP_OUT, s, 0, 0, 1'b0);
    while (c < COLS) begin
      @(negedge clk);
      sout_ready = 1'b1;
      #1;
      if (sout_valid) begin
        res[r][c] = sout_data;
        if (r == ROWS - 1) begin r = 0; c++; end
        else r++;
      end
    end
    @(negedge clk);
    sout_ready = 1'b0;
  endtask

  task automatic clear_images();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img_a[r][c] = 0;
        img_b[r][c] = 0;
      end
  endtask

  task automatic rect_a(int r0, int r1, int c0, int c1);
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++) img_a[r][c] = 1;
  endtask

  task automatic rect_b(int r0, int r1, int c0, int c1);
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++) img_b[r][c] = 1;
  endtask

  function automatic int errors_in(int r0, int r1, int c0, int c1);
    int n = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (r >= 0 && r < ROWS && c >= 0 && c < COLS) n += res[r][c];
    return n;
  endfunction

  task automatic expect_error(string what, int r0, int r1, int c0, int c1);
    checks++;
    if (errors_in(r0, r1, c0, c1) == 0) begin
      failures++;
      $display("%s: not reported", what);
    end else
      $display("%s: reported (%0d pixels)", what, errors_in(r0, r1, c0, c1));
  endtask

  task automatic expect_clean(string what, int r0, int r1, int c0, int c1);
    checks++;
    if (errors_in(r0, r1, c0, c1) != 0) begin
      failures++;
      $display("%s: %0d false error pixels", what, errors_in(r0, r1, c0, c1));
    end else
      $display("%s: clean", what);
  endtask

  // rule programs
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 3-lambda width rule
    clear_images();
    rect_a(4, 4, 4, 20);      // 1 wide
    rect_a(10, 11, 4, 20);    // 2 wide
    rect_a(18, 20, 4, 20);    // 3 wide: legal
    rect_a(30, 34, 4, 8);     // 5x5: legal
    rect_a(40, 56, 30, 31);   // 2 wide, vertical
    rect_a(45, 46, 45, 46);   // two 2x2 squares meeting at a corner
    rect_a(47, 48, 47, 48);
    load_layer(LA, img_a);
    width_rule_check(LA, 3);
    read_layer(3);
    expect_error("width: 1-wide bar", 3, 5, 3, 21);
    expect_error("width: 2-wide bar", 9, 12, 3, 21);
    expect_clean("width: 3-wide bar", 17, 21, 3, 21);
    expect_clean("width: 5x5 square", 29, 35, 3, 9);
    expect_error("width: 2-wide vertical bar", 39, 57, 29, 32);
    expect_error("width: diagonal contact", 44, 49, 44, 49);

    // 3-lambda spacing rule within layer A
    clear_images();
    rect_a(4, 6, 4, 20);  rect_a(8, 10, 4, 20);    // gap 1
    rect_a(16, 18, 4, 20); rect_a(21, 23, 4, 20);  // gap 2
    rect_a(30, 32, 4, 20); rect_a(36, 38, 4, 20);  // gap 3: legal
    rect_a(44, 60, 4, 6); rect_a(44, 60, 9, 11);   // gap 2, side by side
    rect_a(44, 60, 30, 32); rect_a(44, 60, 36, 38); // gap 3, side by side
    load_layer(LA, img_a);
    space_rule_check_1(LA, 3);
    read_layer(3);
    expect_error("spacing: gap 1", 7, 7, 4, 20);
    expect_error("spacing: gap 2", 19, 20, 4, 20);
    expect_clean("spacing: gap 3", 29, 39, 3, 21);
    expect_error("spacing: gap 2, columns", 44, 60, 7, 8);
    expect_clean("spacing: gap 3, columns", 43, 61, 29, 39);

    // 3-lambda spacing between layers A and B
    clear_images();
    rect_a(4, 8, 4, 20);   rect_b(11, 15, 4, 20);  // gap 2
    rect_a(30, 34, 4, 20); rect_b(38, 42, 4, 20);  // gap 3: legal
    load_layer(LA, img_a);
    load_layer(LB, img_b);
    space_rule_check_2(LA, LB, 3);
    read_layer(3);
    expect_error("A-B spacing: gap 2", 9, 10, 4, 20);
    expect_clean("A-B spacing: gap 3", 29, 43, 3, 21);

    // 2-lambda extension of B over A
    clear_images();
    rect_a(20, 24, 4, 60);                          // A, wide
    rect_b(19, 25, 10, 12);                         // B, 1 beyond A: error
    rect_b(16, 28, 30, 32);                         // B, 4 beyond A: legal
    load_layer(LA, img_a);
    load_layer(LB, img_b);
    extension_rule_check(LA, LB, 2);
    read_layer(3);
    expect_error("extension: 1 beyond", 15, 29, 8, 14);
    expect_clean("extension: 4 beyond", 12, 32, 28, 34);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
