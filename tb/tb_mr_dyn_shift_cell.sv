// tb_mr_dyn_shift_cell: eight cells in a closed ring, driven by a two-phase
// non-overlapping clock. A random byte is shifted in through a multiplexer
// in front of the first cell, then the ring is closed and left to
// circulate: the last cell must give the byte back bit by bit, in order,
// on every trip around the ring.
module tb_mr_dyn_shift_cell;

  localparam int N = 8;

  logic         phi1 = 0, phi2 = 0;
  logic         load = 1, din = 0;
  logic [N-1:0] q;
  logic         d0;
  int           checks = 0, failures = 0;

  assign d0 = load ? din : q[N-1];

  for (genvar i = 0; i < N; i++) begin : g_cell
    mr_dyn_shift_cell u_cell (
      .phi1 (phi1),
      .phi2 (phi2),
      .d    ((i == 0) ? d0 : q[i-1]),
      .q    (q[i])
    );
  end

  // one clock pair: phi1 high, gap, phi2 high, gap
  task automatic tick();
    #5 phi1 = 1;
    #10 phi1 = 0;
    #5 phi2 = 1;
    #10 phi2 = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] pattern;
    for (int t = 0; t < 6; t++) begin
      pattern = N'($urandom);
      load = 1;
      for (int i = 0; i < N; i++) begin
        din = pattern[i];
        tick();
      end
      // pattern[0] is now in the last cell
      load = 0;
      for (int trip = 0; trip < 3; trip++)
        for (int i = 0; i < N; i++) begin
          #5;
          checks++;
          if (q[N-1] !== pattern[i]) begin
            failures++;
            $display("trip %0d bit %0d: %0b expected %0b", trip, i, q[N-1], pattern[i]);
          end
          tick();
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
