// tb_gshare_dirpred: self-checking test of the gshare direction predictor
// at its full 16K-entry size. A software model keeps the counters and the
// global history; random lookups (enabled and disabled) and updates are
// compared with it; the model starts from the table's power-up contents. A strongly biased branch must end up predicted taken,
// and the index must change with the history.
module tb_gshare_dirpred;
  localparam int unsigned PC_W = 32, ENTRIES = 16384, IDX_W = 14;
  logic clk = 0, rst_n = 0;
  logic lk_en, lk_taken, upd_en, upd_taken;
  logic [PC_W-1:0] lk_pc;
  logic [IDX_W-1:0] lk_idx, upd_idx;
  int checks = 0, failures = 0;
  int m_ctr[ENTRIES];
  logic [IDX_W-1:0] m_ghr;

  gshare_dirpred #(.PC_W(PC_W), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic step(input logic [PC_W-1:0] pc, input bit en, input bit u, input bit t);
    logic [IDX_W-1:0] i;
    i = pc[IDX_W+1:2] ^ m_ghr;
    lk_pc = pc; lk_en = en; #1;
    chk(lk_idx == i, "lookup index = PC xor history");
    chk(lk_taken == (en && m_ctr[i] >= 2), $sformatf("prediction idx=%0d", i));
    upd_en = u; upd_idx = i; upd_taken = t;
    @(posedge clk); #1;
    upd_en = 0;
    if (u) begin
      if (t && m_ctr[i] < 3) m_ctr[i]++;
      if (!t && m_ctr[i] > 0) m_ctr[i]--;
      m_ghr = {m_ghr[IDX_W-2:0], t};
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_en = 0; lk_pc = 0; upd_en = 0; upd_idx = 0; upd_taken = 0;
    m_ghr = '0;
    #12 rst_n = 1;
    @(negedge clk);
    // the counter table is not reset: start the model from its contents
    for (int i = 0; i < int'(ENTRIES); i++) m_ctr[i] = int'(dut.ctr_q[i]);
    // all-taken branch: history saturates at all ones, counter becomes strong taken
    for (int i = 0; i < 40; i++) step(32'h0000_1000, 1, 1, 1);
    step(32'h0000_1000, 1, 0, 0);
    chk(lk_taken == 1, "biased branch predicted taken");
    step(32'h0000_1000, 0, 0, 0);
    chk(lk_taken == 0, "disabled lookup predicts not taken");
    for (int i = 0; i < 8000; i++)
      step({16'h0, 8'($urandom_range(0, 15)), 6'($urandom), 2'b00}, $urandom_range(0, 3) != 0,
           $urandom_range(0, 1), $urandom_range(0, 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
