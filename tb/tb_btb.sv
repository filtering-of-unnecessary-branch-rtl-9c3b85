// tb_btb: self-checking test of the direct-mapped BTB (64 entries, 32-bit PC).
// Allocations, target updates and lookups with random PCs drawn from a small
// address window (so entries collide and replace each other) are compared
// with a software table. Every lookup is checked at the fetch port, with the
// enable both high and low, and at the EX probe port.
module tb_btb;
  localparam int unsigned PC_W = 32, ENTRIES = 64, IDX_W = 6;
  logic clk = 0, rst_n = 0;
  logic lk_en; logic [PC_W-1:0] lk_pc, lk_target; logic lk_hit;
  logic [PC_W-1:0] ex_pc, ex_target; logic ex_hit; logic [IDX_W-1:0] ex_idx;
  logic wr_alloc, wr_target; logic [PC_W-1:0] wr_pc, wr_tgt;
  int checks = 0, failures = 0, n_hit = 0, n_replace = 0;
  bit m_v[ENTRIES]; logic [PC_W-1:0] m_pc[ENTRIES], m_t[ENTRIES];

  btb #(.PC_W(PC_W), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [PC_W-1:0] rpc();
    return {18'h0, 4'($urandom_range(0, 3)), 8'($urandom), 2'b00};
  endfunction

  task automatic look(input logic [PC_W-1:0] pc, input bit en);
    int i; bit h;
    i = int'(pc[IDX_W+1:2]);
    h = m_v[i] && m_pc[i] == pc;
    lk_en = en; lk_pc = pc; ex_pc = pc; #1;
    chk(lk_hit == (h && en), $sformatf("lk_hit pc=%h", pc));
    if (h && en) begin chk(lk_target == m_t[i], "lk_target"); n_hit++; end
    chk(ex_hit == h, "ex_hit");
    chk(ex_idx == IDX_W'(i), "ex_idx");
    if (h) chk(ex_target == m_t[i], "ex_target");
  endtask

  task automatic wr(input bit a, input bit t, input logic [PC_W-1:0] pc, input logic [PC_W-1:0] tg);
    int i;
    i = int'(pc[IDX_W+1:2]);
    wr_alloc = a; wr_target = t; wr_pc = pc; wr_tgt = tg;
    @(posedge clk); #1;
    wr_alloc = 0; wr_target = 0;
    if (a) begin
      if (m_v[i] && m_pc[i] != pc) n_replace++;
      m_v[i] = 1; m_pc[i] = pc; m_t[i] = tg;
    end else if (t) m_t[i] = tg;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_en = 0; lk_pc = 0; ex_pc = 0; wr_alloc = 0; wr_target = 0; wr_pc = 0; wr_tgt = 0;
    for (int i = 0; i < int'(ENTRIES); i++) begin m_v[i] = 0; m_pc[i] = 0; m_t[i] = 0; end
    #12 rst_n = 1;
    @(negedge clk);
    look(32'h0000_0008, 1);
    chk(!lk_hit, "empty after reset");
    wr(1, 0, 32'h0000_0008, 32'h0000_0000);
    look(32'h0000_0008, 1); chk(lk_hit && lk_target == 0, "allocated branch hits");
    look(32'h0000_0008, 0); chk(!lk_hit, "no hit while lookup disabled");
    look(32'h0000_0108, 1); chk(!lk_hit && ex_idx == 2, "same index, other tag misses");
    wr(0, 1, 32'h0000_0008, 32'h0000_0040);
    look(32'h0000_0008, 1); chk(lk_target == 32'h40, "target updated");
    for (int i = 0; i < 6000; i++) begin
      logic [PC_W-1:0] pc;
      pc = rpc();
      look(pc, $urandom_range(0, 3) != 0);
      if ($urandom_range(0, 2) == 0) wr(1, 0, pc, rpc());
      else if ($urandom_range(0, 3) == 0 && ex_hit) wr(0, 1, pc, rpc());
    end
    chk(n_hit > 100 && n_replace > 50, "hits and replacements exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
