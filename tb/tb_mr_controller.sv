// tb_mr_controller: decoder/controller with 4 rows and 8 columns.
// A monitor samples the outputs every clock and checks:
//   * a processor instruction writes back for exactly COLS consecutive
//     clocks, from the first column to the last, with the control fields of
//     the instruction, and starts within one ring cycle of being taken;
//   * two instructions offered back to back write for 2*COLS clocks in a row;
//   * mr-IN takes ROWS*COLS bits, stops the ring while shifting, loads
//     COLS columns into the destination layer, first one at column 0;
//   * mr-OUT captures COLS columns of the source layer and sends ROWS*COLS
//     bits, stopping the ring while sending.
// The host side inserts random gaps on both serial handshakes.
module tb_mr_controller;
  import mr_pkg::*;

  localparam int ROWS = 4;
  localparam int COLS = 8;

  logic      clk = 0, rst_n = 0;
  logic      instr_valid = 0;
  mr_instr_t instr = '0;
  logic      instr_ready, busy;
  logic      sin_valid = 0, sin_ready, sout_valid, sout_ready = 0;
  logic      adv;
  mr_ctl_t   ctl;
  layer_t    io_layer;
  logic      io_load, io_cap, io_shift;
  int        checks = 0, failures = 0;

  mr_controller #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("%s", msg);
  endtask

  // monitor counters (sampled just before each rising edge)
  int wr_run = 0, max_run = 0, wr_total = 0, loads = 0, caps = 0, ins = 0, outs = 0;
  int shifts_since_load = 0, shifts_since_cap = 0;
  int col_seen = 0;  // column index implied by counting adv clocks
  mr_instr_t cur;

  always @(negedge clk) if (rst_n) begin
    #2;
    // column counter kept here: advances with adv, wraps at COLS
    checks++;
    if (ctl.first_col !== (col_seen == 0) || ctl.last_col !== (col_seen == COLS - 1))
      fail($sformatf("column flags wrong at column %0d", col_seen));
    if (ctl.wr_en) begin
      checks++;
      if (!adv) fail("write-back while the ring stops");
      if (wr_run == 0 && !ctl.first_col) fail("write-back does not start at column 0");
      if (ctl.op !== cur.op || ctl.sel_c !== cur.src1 || ctl.sel_b1 !== cur.src1 ||
          ctl.sel_b2 !== cur.src2 || ctl.dest !== cur.dest || ctl.paint !== cur.paint)
        fail("control fields differ from the instruction");
      wr_run++;
      if (wr_run > max_run) max_run = wr_run;
      wr_total++;
    end else if (wr_run != 0) begin
      checks++;
      if (wr_run % COLS != 0) fail($sformatf("write-back ran %0d clocks", wr_run));
      wr_run = 0;
    end
    if (sin_valid && sin_ready) begin
      ins++;
      shifts_since_load++;
      checks++;
      if (adv || !io_shift) fail("ring moves or I/O does not shift during input");
    end
    if (io_load) begin
      checks++;
      if (shifts_since_load != ROWS) fail($sformatf("load after %0d bits", shifts_since_load));
      if (io_layer !== cur.dest) fail("load into the wrong layer");
      if (!adv) fail("load while the ring stops");
      if (loads % COLS == 0 && !ctl.first_col) fail("first load not at column 0");
      shifts_since_load = 0;
      loads++;
    end
    if (io_cap) begin
      checks++;
      if (io_layer !== cur.src1) fail("capture from the wrong layer");
      if (caps % COLS == 0 && !ctl.first_col) fail("first capture not at column 0");
      if (caps != 0 && shifts_since_cap != ROWS) fail("capture before the column was sent");
      shifts_since_cap = 0;
      caps++;
    end
    if (sout_valid && sout_ready) begin
      outs++;
      shifts_since_cap++;
      checks++;
      if (adv || !io_shift) fail("ring moves or I/O does not shift during output");
    end
  end

  always @(posedge clk) if (rst_n && adv) col_seen <= (col_seen == COLS - 1) ? 0 : col_seen + 1;

  task automatic send(mr_op_e op);
    @(negedge clk);
    instr_valid = 1;
    instr = mr_instr_t'($urandom);
    instr.op = op;
    #1;
    while (!instr_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    cur = instr;
    #1;
    instr_valid = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    #500000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host serial side: random gaps
  always @(negedge clk) begin
    sin_valid  <= ($urandom % 3) != 0;
    sout_ready <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // single processor instructions at random starting columns
    for (int k = 0; k < 12; k++) begin
      repeat ($urandom % 11) @(negedge clk);
      send(mr_op_e'(k % 14));
      wait_idle();
      checks++;
      if (wr_total != (k + 1) * COLS) fail($sformatf("%0d write-back clocks in all", wr_total));
    end
    // back to back
    send(OP_AND);
    send(OP_EXP_NE);
    send(OP_INDTC);
    wait_idle();
    @(negedge clk);
    checks++;
    if (max_run != 3 * COLS) fail($sformatf("back-to-back write-back ran %0d clocks", max_run));
    // input and output
    send(OP_IN);
    wait_idle();
    checks++;
    if (ins != ROWS * COLS || loads != COLS) fail($sformatf("mr-IN: %0d bits, %0d loads", ins, loads));
    send(OP_OUT);
    wait_idle();
    checks++;
    if (outs != ROWS * COLS || caps != COLS) fail($sformatf("mr-OUT: %0d bits, %0d captures", outs, caps));
    // out followed directly by a processor instruction
    send(OP_OUT);
    send(OP_OR);
    wait_idle();
    repeat (2) @(negedge clk);
    checks++;
    if (wr_total != 16 * COLS) fail($sformatf("%0d write-back clocks in all", wr_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
