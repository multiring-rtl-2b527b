// tb_mr_io_unit: I/O unit with 8 rows. Repeats, for random layers:
//   * shift a random column in (row 0 first), then load it into a passing
//     column: only the chosen layer may change, and it must equal the bits
//     sent; without load_en the column must pass unchanged;
//   * capture a random passing column and shift it out: sout must give the
//     chosen layer's bits, row 0 first.
module tb_mr_io_unit;
  import mr_pkg::*;

  localparam int ROWS = 8;

  logic                            clk = 0, rst_n = 0;
  layer_t                          layer = '0;
  logic                            load_en = 0, cap_en = 0, shift_en = 0, sin = 0, sout;
  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in = '0, col_out;
  int                              checks = 0, failures = 0;

  mr_io_unit #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ROWS-1:0] bits;
    logic [NUM_LAYERS-1:0][ROWS-1:0] expc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      // serial in
      bits = ROWS'($urandom);
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        while (($urandom % 3) == 0) begin shift_en = 0; @(negedge clk); end
        shift_en = 1;
        sin = bits[r];
      end
      @(negedge clk);
      shift_en = 0;
      // a column passing without load is untouched
      col_in = (NUM_LAYERS * ROWS)'($urandom);
      layer = layer_t'($urandom);
      #1;
      checks++;
      if (col_out !== col_in) begin failures++; $display("column changed without load"); end
      // load into the passing column
      load_en = 1;
      #1;
      expc = col_in;
      expc[layer] = bits;
      checks++;
      if (col_out !== expc) begin
        failures++;
        $display("load layer %0d: %h expected %h", layer, col_out, expc);
      end
      @(negedge clk);
      load_en = 0;
      // capture and serial out
      col_in = (NUM_LAYERS * ROWS)'($urandom);
      layer = layer_t'($urandom);
      cap_en = 1;
      @(negedge clk);
      cap_en = 0;
      col_in = '0;
      for (int r = 0; r < ROWS; r++) begin
        while (($urandom % 3) == 0) @(negedge clk);
        checks++;
        if (sout !== col_cap(r)) begin
          failures++;
          $display("out row %0d: %0b expected %0b", r, sout, col_cap(r));
        end
        shift_en = 1;
        @(negedge clk);
        shift_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the captured column, remembered at the capture edge
  logic [ROWS-1:0] captured;
  always @(posedge clk) if (cap_en) captured <= col_in[layer];
  function automatic bit col_cap(int r);
    return captured[r];
  endfunction
endmodule
