// tb_mr_ring_memory: a ring memory of 5 rows and 7 stages. Random columns
// enter with random gaps in adv; each must come out unchanged exactly DEPTH
// enabled clocks later, and nothing may move while adv is low. The output
// is also fed back for a stretch to check that a column written back comes
// round again after another DEPTH enabled clocks.
module tb_mr_ring_memory;
  import mr_pkg::*;

  localparam int ROWS  = 5;
  localparam int DEPTH = 7;
  localparam int N     = 300;

  logic                            clk = 0, rst_n = 0, adv = 0;
  logic [NUM_LAYERS-1:0][ROWS-1:0] col_in = '0, col_out;
  int                              checks = 0, failures = 0;

  mr_ring_memory #(.ROWS(ROWS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [NUM_LAYERS-1:0][ROWS-1:0] hist [N + DEPTH];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic [NUM_LAYERS-1:0][ROWS-1:0] prev;
    e = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (col_out !== '0) begin failures++; $display("not cleared by reset"); end
    rst_n = 1;
    while (e < N) begin
      @(negedge clk);
      // e enabled edges so far: the output is the column from edge e-DEPTH
      if (e >= DEPTH) begin
        checks++;
        if (col_out !== hist[e - DEPTH]) begin
          failures++;
          $display("edge %0d: column %h expected %h", e, col_out, hist[e - DEPTH]);
        end
      end
      prev = col_out;
      adv = ($urandom % 3) != 0;
      // second half: feed the output back, closing the ring
      col_in = (e >= N / 2) ? col_out : (NUM_LAYERS * ROWS)'($urandom);
      if (adv) begin
        hist[e] = col_in;
        e++;
      end else begin
        @(posedge clk);
        #1;
        checks++;
        if (col_out !== prev) begin failures++; $display("moved while adv low"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
