// tb_nbdt: self-checking test of the NBD table (16 entries, 9-bit NBDs).
// Checks that all valid bits are clear after reset, that a write stores the
// NBD in the field of its direction and validates only that field, that the
// fetch port returns the field picked by the predicted direction and nothing
// when disabled, and that an invalidation clears the selected valid bits and
// wins over a same-cycle write. Then 4000 random operations are compared
// with a software copy of the table.
module tb_nbdt;
  import nbd_pkg::*;
  localparam int unsigned ENTRIES = 16, NBD_W = 9, IDX_W = 4;
  logic clk = 0, rst_n = 0;
  logic rd_en; logic [IDX_W-1:0] rd_idx; bdir_e rd_dir;
  logic [NBD_W-1:0] rd_nbd; logic rd_valid;
  logic [IDX_W-1:0] ex_idx; logic ex_tkn_v, ex_nt_v;
  logic wr_en; logic [IDX_W-1:0] wr_idx; bdir_e wr_dir; logic [NBD_W-1:0] wr_nbd;
  logic inv_en; logic [IDX_W-1:0] inv_idx; logic inv_tkn, inv_nt;
  int checks = 0, failures = 0;
  int m_tn[ENTRIES], m_nn[ENTRIES];
  bit m_tv[ENTRIES], m_nv[ENTRIES];

  nbdt #(.ENTRIES(ENTRIES), .NBD_W(NBD_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic probe_all();
    for (int i = 0; i < int'(ENTRIES); i++) begin
      for (int d = 0; d < 2; d++) begin
        rd_en = 1; rd_idx = IDX_W'(i); rd_dir = bdir_e'(d); ex_idx = IDX_W'(i);
        #1;
        if (d == 1) begin
          chk(rd_valid == m_tv[i], $sformatf("tkn_v[%0d]", i));
          if (m_tv[i]) chk(rd_nbd == NBD_W'(m_tn[i]), $sformatf("tkn_NBD[%0d]", i));
        end else begin
          chk(rd_valid == m_nv[i], $sformatf("nt_v[%0d]", i));
          if (m_nv[i]) chk(rd_nbd == NBD_W'(m_nn[i]), $sformatf("nt_NBD[%0d]", i));
        end
        chk(ex_tkn_v == m_tv[i] && ex_nt_v == m_nv[i], "EX probe valid bits");
      end
    end
    rd_en = 0; #1;
    chk(rd_valid == 0 && rd_nbd == 0, "disabled read returns nothing");
  endtask

  task automatic op(input bit we, input int wi, input int wd, input int wn,
                    input bit ie, input int ii, input bit it, input bit in_);
    wr_en = we; wr_idx = IDX_W'(wi); wr_dir = bdir_e'(wd); wr_nbd = NBD_W'(wn);
    inv_en = ie; inv_idx = IDX_W'(ii); inv_tkn = it; inv_nt = in_;
    @(posedge clk); #1;
    wr_en = 0; inv_en = 0;
    if (we) begin
      if (wd == 1) begin m_tn[wi] = wn; m_tv[wi] = 1; end
      else begin m_nn[wi] = wn; m_nv[wi] = 1; end
    end
    if (ie && it) m_tv[ii] = 0;
    if (ie && in_) m_nv[ii] = 0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; rd_idx = 0; rd_dir = DIR_NT; ex_idx = 0;
    wr_en = 0; wr_idx = 0; wr_dir = DIR_NT; wr_nbd = 0;
    inv_en = 0; inv_idx = 0; inv_tkn = 0; inv_nt = 0;
    for (int i = 0; i < int'(ENTRIES); i++) begin m_tv[i] = 0; m_nv[i] = 0; m_tn[i] = 0; m_nn[i] = 0; end
    #12 rst_n = 1;
    @(negedge clk);
    probe_all();                              // all invalid after reset
    op(1, 3, 1, 2, 0, 0, 0, 0);               // tkn_NBD[3] = 2
    op(1, 3, 0, 300, 0, 0, 0, 0);             // nt_NBD[3] = 300
    probe_all();
    op(0, 0, 0, 0, 1, 3, 1, 0);               // invalidate tkn_v only
    probe_all();
    op(1, 5, 1, 7, 1, 5, 1, 1);               // same-cycle write and invalidate
    probe_all();
    chk(m_tv[5] == 0, "invalidate wins");
    for (int i = 0; i < 4000; i++) begin
      op($urandom_range(0, 1), $urandom_range(0, ENTRIES-1), $urandom_range(0, 1),
         $urandom_range(0, 511), $urandom_range(0, 3) == 0, $urandom_range(0, ENTRIES-1),
         $urandom_range(0, 1), $urandom_range(0, 1));
      if (i % 100 == 0) probe_all();
    end
    probe_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
