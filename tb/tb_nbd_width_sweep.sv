// tb_nbd_width_sweep: the end-to-end program of tb_nbd_frontend run on eight
// front ends side by side, built with NBD widths 5 to 12 (the range over
// which the distance width is traded off against table size). Each instance
// must pass all its own checks (no prediction differs from an unfiltered
// predictor, every collected distance is exact or saturated, every mechanism
// occurs). Across widths, a wider distance must filter more: the 5-bit
// design must perform more lookups than the 9-bit one, which must perform
// more than the 12-bit one, since only 10 or more bits cover the program's
// 600-instruction basic block. The lookup ratio of each width is printed.
module tb_nbd_width_sweep;
  localparam int N_W = 8;
  localparam int W0 = 5;

  logic [N_W-1:0] done;
  int checks_w[N_W], failures_w[N_W], fetches_w[N_W], lookups_w[N_W];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < N_W; g++) begin : g_w
    nbd_width_env #(.NBD_W(W0 + g), .RETIRE_TARGET(30000)) u_env (
      .done     (done[g]),
      .checks   (checks_w[g]),
      .failures (failures_w[g]),
      .fetches  (fetches_w[g]),
      .lookups  (lookups_w[g])
    );
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    #1;
    for (int i = 0; i < N_W; i++) begin
      checks += checks_w[i];
      failures += failures_w[i];
      $display("n=%0d lookups %0d of %0d fetches", W0 + i, lookups_w[i], fetches_w[i]);
    end
    checks++;
    if (!(lookups_w[0] > lookups_w[9 - W0])) begin
      failures++; $display("FAIL 5-bit NBDs should need more lookups than 9-bit");
    end
    checks++;
    if (!(lookups_w[9 - W0] > lookups_w[12 - W0])) begin
      failures++; $display("FAIL 9-bit NBDs should need more lookups than 12-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
