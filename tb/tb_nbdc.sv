// tb_nbdc: self-checking test of the NBD counter.
// Replays the three-instruction loop (ADD, CMP, BNE) and expects the counts
// 1, 2 and the distance 2 on the branch, then drives 3000 random executed /
// idle, branch / non-branch steps against a software count, including runs
// long enough to reach the 9-bit saturation value 511.
module tb_nbdc;
  localparam int unsigned NBD_W = 9;
  logic clk = 0, rst_n = 0;
  logic step, is_branch;
  logic [NBD_W-1:0] count;
  logic saturated;
  int checks = 0, failures = 0, n_sat = 0;
  int model;

  nbdc #(.NBD_W(NBD_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic exec(input bit s, input bit b);
    step = s; is_branch = b;
    @(posedge clk); #1;
    if (s) model = b ? 0 : (model < 511 ? model + 1 : 511);
    chk(count == NBD_W'(model), $sformatf("count %0d expected %0d", count, model));
    chk(saturated == (model == 511), "saturated flag");
    if (saturated) n_sat++;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0; is_branch = 0; model = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(count == 0, "reset value");
    // Table-1 loop: first BNE only clears, then ADD=1, CMP=2, BNE sees 2.
    exec(1, 1);
    exec(1, 0); chk(count == 1, "ADD -> 1");
    exec(1, 0); chk(count == 2, "CMP -> 2");
    chk(count == 2, "distance of BNE is 2 while it executes");
    exec(1, 1); chk(count == 0, "BNE clears");
    // idle cycles hold
    exec(0, 1); exec(0, 0);
    // long basic block: saturation
    for (int i = 0; i < 600; i++) exec(1, 0);
    chk(count == 511, "saturates at 511");
    exec(1, 1);
    for (int i = 0; i < 3000; i++) exec($urandom_range(0, 9) != 0, $urandom_range(0, 199) == 0);
    chk(n_sat > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
