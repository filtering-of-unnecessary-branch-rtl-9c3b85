// tb_next_lookup_filter: self-checking test of ER / Next_en / EN.
// First the loop of Table 2: the branch hits with a valid taken NBD of 2,
// and the two following non-branch fetches must see ER = 1 then 0, Next_en
// 0 then 1, EN 0, 0 and 1 on the branch again. Then a random mix of hits with
// valid and invalid NBDs, non-hits, stalls and flushes is compared cycle by
// cycle with a software model of the register.
module tb_next_lookup_filter;
  localparam int unsigned NBD_W = 9;
  logic clk = 0, rst_n = 0;
  logic advance, flush, hit, nbd_valid;
  logic [NBD_W-1:0] nbd;
  logic en, next_en;
  logic [NBD_W-1:0] er;
  int checks = 0, failures = 0;
  int m_er, m_en, n_filtered = 0, n_flush = 0, n_load = 0;

  next_lookup_filter #(.NBD_W(NBD_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Apply one cycle; check the combinational next_en, then the registers.
  task automatic cyc(input bit a, input bit f, input bit h, input int d, input bit v);
    int e_next;
    advance = a; flush = f; hit = h; nbd = NBD_W'(d); nbd_valid = v;
    #1;
    e_next = h ? (v ? d : 0) : (m_er == 0 ? 0 : m_er - 1);
    chk(next_en == (e_next == 0), "next_en");
    @(posedge clk); #1;
    if (f) begin m_er = 0; m_en = 1; n_flush++; end
    else if (a) begin m_er = e_next; m_en = (e_next == 0); if (h && v) n_load++; end
    chk(er == NBD_W'(m_er), $sformatf("er %0d expected %0d", er, m_er));
    chk(en == m_en[0], "en");
    if (!en) n_filtered++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; flush = 0; hit = 0; nbd = 0; nbd_valid = 0;
    m_er = 0; m_en = 1;
    #12 rst_n = 1;
    @(negedge clk);
    chk(er == 0 && en == 1, "reset: ER=0, EN=1");
    // Table 2
    chk(en == 1, "BNE fetched with EN=1");
    cyc(1, 0, 1, 2, 1); chk(er == 2 && en == 0, "BNE: ER=2, EN for ADD = 0");
    cyc(1, 0, 0, 0, 0); chk(er == 1 && en == 0, "ADD: ER=1, EN for CMP = 0");
    cyc(1, 0, 0, 0, 0); chk(er == 0 && en == 1, "CMP: ER=0, EN for BNE = 1");
    // invalid NBD on hit -> default 0
    cyc(1, 0, 1, 7, 0); chk(er == 0 && en == 1, "invalid NBD loads 0");
    // stall holds, flush resets
    cyc(1, 0, 1, 5, 1);
    cyc(0, 0, 0, 0, 0); chk(er == 5 && en == 0, "stall holds");
    cyc(1, 1, 0, 0, 0); chk(er == 0 && en == 1, "flush resets ER and sets EN");
    for (int i = 0; i < 5000; i++) begin
      bit h;
      h = m_en[0] && ($urandom_range(0, 5) == 0);
      cyc($urandom_range(0, 7) != 0, $urandom_range(0, 40) == 0, h,
          $urandom_range(0, 20), $urandom_range(0, 3) != 0);
    end
    chk(n_filtered > 100 && n_flush > 10 && n_load > 10, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
