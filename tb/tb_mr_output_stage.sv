// tb_mr_output_stage: random columns with random gaps in adv. Checks that
// c_out shows, five enabled clocks after a column entered, that column with
// Po written or painted into the destination layer, or unchanged when
// wr_en is low; and that nothing moves while adv is low.
module tb_mr_output_stage;
  import mr_pkg::*;

  logic                  clk = 0, rst_n = 0, adv = 0;
  logic [NUM_LAYERS-1:0] c_in = '0, c_out;
  logic                  po = 0, wr_en = 0, paint = 0;
  layer_t                dest = '0;
  int                    checks = 0, failures = 0;

  mr_output_stage dut (.*);

  always #5 clk = ~clk;

  localparam int N = 400;
  logic [NUM_LAYERS-1:0] in_h [N];
  logic                  po_h [N], we_h [N], pt_h [N];
  layer_t                de_h [N];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e = 0;
    for (int i = 0; i < N; i++) begin
      in_h[i] = NUM_LAYERS'($urandom);
      po_h[i] = 1'($urandom);
      we_h[i] = 1'($urandom);
      pt_h[i] = 1'($urandom);
      de_h[i] = layer_t'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (e < N) begin
      logic [NUM_LAYERS-1:0] prev_out;
      @(negedge clk);
      prev_out = c_out;
      // check the result of the column that entered five enabled edges ago
      if (e >= 5) begin
        logic [NUM_LAYERS-1:0] exp_c;
        int j;
        j = e - 5;
        exp_c = in_h[j];
        if (we_h[j]) exp_c[de_h[j]] = pt_h[j] ? (in_h[j][de_h[j]] | po_h[j]) : po_h[j];
        checks++;
        if (c_out !== exp_c) begin
          failures++;
          $display("column %0d: c_out=%b expected %b", j, c_out, exp_c);
        end
      end
      adv = ($urandom % 4) != 0;
      if (adv) begin
        c_in = in_h[e];
        // Po and its control belong to the column four enabled edges back
        if (e >= 4) begin
          po = po_h[e-4]; wr_en = we_h[e-4]; paint = pt_h[e-4]; dest = de_h[e-4];
        end
        e++;
      end else begin
        c_in = NUM_LAYERS'($urandom);
        po = 1'($urandom);
        @(posedge clk);
        #1;
        checks++;
        if (c_out !== prev_out) begin failures++; $display("moved while adv low"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
