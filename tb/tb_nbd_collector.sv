// tb_nbd_collector: self-checking test of the EX-stage collection control.
// Each leaf of the collection decision tree is driven once and its BTB and
// NBDT requests are checked, and the following branch is used to check that
// the pending collection writes the NBDC value to the remembered index and
// direction (or, after a leaf without collection, writes nothing). Also
// checked: non-branch and idle cycles change nothing, and a one-branch loop
// does not collect its distance twice (forwarding of the write). Finally
// 3000 random instructions are compared with a table model of the rules.
module tb_nbd_collector;
  import nbd_pkg::*;
  localparam int unsigned ENTRIES = 512, NBD_W = 9, IDX_W = 9;
  logic clk = 0, rst_n = 0;
  logic ex_valid, ex_branch, ex_taken, ex_btb_hit, ex_target_mismatch, ex_tkn_v, ex_nt_v;
  logic [IDX_W-1:0] ex_idx;
  logic [NBD_W-1:0] nbd;
  logic nbdt_wr_en, nbdt_inv_en, nbdt_inv_tkn, nbdt_inv_nt, btb_alloc, btb_update_target;
  logic [IDX_W-1:0] nbdt_wr_idx, nbdt_inv_idx;
  bdir_e nbdt_wr_dir;
  logic [NBD_W-1:0] nbdt_wr_nbd;
  int checks = 0, failures = 0;

  nbd_collector #(.ENTRIES(ENTRIES), .NBD_W(NBD_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Present one executed branch. exp_* are the expected requests for it;
  // wr_* the expected write closing the previous branch (-1: no write).
  task automatic br(input bit tk, input bit hit, input int idx, input bit mism,
                    input bit tv, input bit nv, input int n,
                    input bit exp_alloc, input bit exp_upd, input bit exp_inv_t, input bit exp_inv_n,
                    input int wr_idx, input int wr_dir, input string name);
    ex_valid = 1; ex_branch = 1; ex_taken = tk; ex_btb_hit = hit; ex_idx = IDX_W'(idx);
    ex_target_mismatch = mism; ex_tkn_v = tv; ex_nt_v = nv; nbd = NBD_W'(n);
    #1;
    chk(btb_alloc == exp_alloc, {name, ": btb_alloc"});
    chk(btb_update_target == exp_upd, {name, ": btb_update_target"});
    chk((nbdt_inv_en && nbdt_inv_tkn) == exp_inv_t, {name, ": invalidate tkn_v"});
    chk((nbdt_inv_en && nbdt_inv_nt) == exp_inv_n, {name, ": invalidate nt_v"});
    if (exp_inv_t || exp_inv_n) chk(nbdt_inv_idx == IDX_W'(idx), {name, ": invalidate index"});
    if (wr_idx < 0) chk(!nbdt_wr_en, {name, ": no NBDT write"});
    else begin
      chk(nbdt_wr_en, {name, ": NBDT write"});
      chk(nbdt_wr_idx == IDX_W'(wr_idx) && nbdt_wr_dir == bdir_e'(wr_dir) && nbdt_wr_nbd == NBD_W'(n),
          {name, ": NBDT write index, field and value"});
    end
    @(posedge clk); #1;
    ex_valid = 0;
  endtask

  task automatic nonbranch();
    ex_valid = 1; ex_branch = 0; ex_taken = 0; #1;
    chk(!nbdt_wr_en && !btb_alloc && !btb_update_target && !nbdt_inv_en, "non-branch: no action");
    @(posedge clk); #1;
    ex_valid = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex_valid = 0; ex_branch = 0; ex_taken = 0; ex_btb_hit = 0; ex_idx = 0;
    ex_target_mismatch = 0; ex_tkn_v = 0; ex_nt_v = 0; nbd = 0;
    #12 rst_n = 1;
    @(negedge clk);
    //  tk hit idx mism tv nv nbd  alloc upd invT invN  wr_idx wr_dir
    // taken, not in BTB: allocate, invalidate both, collect T
    br(1, 0, 10, 0, 1, 1, 0,    1, 0, 1, 1,  -1, 0, "taken/miss");
    nonbranch(); nonbranch();
    // next branch closes it: tkn_NBD[10] = 2 (Table 1); this one: not taken,
    // in BTB, nt_v invalid -> collect NT
    br(0, 1, 20, 0, 0, 0, 2,    0, 0, 0, 0,  10, 1, "not-taken/nt_v invalid");
    // closes idx 20 NT; this one: not taken and not in BTB -> nothing
    br(0, 0, 30, 0, 0, 0, 5,    0, 0, 0, 0,  20, 0, "not-taken/miss");
    // no pending collection now; taken, in BTB, tkn_v valid, target right -> nothing
    br(1, 1, 40, 0, 1, 0, 3,    0, 0, 0, 0,  -1, 0, "taken/valid/right target");
    // taken, in BTB, tkn_v valid, target wrong -> update, invalidate tkn_v, collect T
    br(1, 1, 50, 1, 1, 1, 1,    0, 1, 1, 0,  -1, 0, "taken/valid/wrong target");
    // closes idx 50 T; this one: taken, in BTB, tkn_v invalid -> collect T
    br(1, 1, 60, 0, 0, 1, 4,    0, 0, 0, 0,  50, 1, "taken/tkn_v invalid");
    // not taken, in BTB, nt_v valid -> nothing; closes idx 60 T
    br(0, 1, 70, 0, 0, 1, 6,    0, 0, 0, 0,  60, 1, "not-taken/nt_v valid");
    br(1, 1, 80, 0, 1, 1, 0,    0, 0, 0, 0,  -1, 0, "idle check");
    // one-branch loop at idx 90: allocate, then the write of tkn_NBD[90] in
    // the same cycle as its next execution must count as valid
    br(1, 0, 90, 0, 0, 0, 0,    1, 0, 1, 1,  -1, 0, "loop alloc");
    nonbranch(); nonbranch();
    br(1, 1, 90, 0, 0, 0, 2,    0, 0, 0, 0,  90, 1, "loop collect");
    nonbranch(); nonbranch();
    br(1, 1, 90, 0, 1, 0, 2,    0, 0, 0, 0,  -1, 0, "loop no recollect");
    // a replacement in the same cycle as the pending write to its own entry
    br(1, 0, 100, 0, 0, 0, 0,   1, 0, 1, 1,  -1, 0, "B1 alloc");
    br(1, 0, 100, 0, 0, 0, 0,   1, 0, 1, 1, 100, 1, "B2 replaces B1's entry");
    // Random branches and non-branches against a model of the decision
    // table and of the pending write it implies.
    ex_valid = 0; @(posedge clk); #1;
    begin
      bit pend = 1; int lidx = 100, ldir = 1;  // left pending by the last directed case
      for (int i = 0; i < 3000; i++) begin
        bit v, b, tk, hit, mism, tv, nv, tv_e, nv_e, e_alloc, e_upd, e_it, e_in, e_col;
        int idx, n;
        v = $urandom_range(0, 7) != 0; b = $urandom_range(0, 2) == 0;
        tk = $urandom_range(0, 1); hit = $urandom_range(0, 3) != 0; mism = $urandom_range(0, 3) == 0;
        tv = $urandom_range(0, 1); nv = $urandom_range(0, 1);
        idx = $urandom_range(0, 7); n = $urandom_range(0, 511);
        ex_valid = v; ex_branch = b; ex_taken = tk; ex_btb_hit = hit; ex_idx = IDX_W'(idx);
        ex_target_mismatch = mism; ex_tkn_v = tv; ex_nt_v = nv; nbd = NBD_W'(n);
        #1;
        // the write closing the pending collection is visible to this branch
        tv_e = tv || (v && b && pend && lidx == idx && ldir == 1);
        nv_e = nv || (v && b && pend && lidx == idx && ldir == 0);
        {e_alloc, e_upd, e_it, e_in, e_col} = 5'b0;
        if (v && b) begin
          casez ({tk, hit, tv_e, nv_e, mism})
            5'b0_1_?_0_?: e_col = 1;
            5'b0_?_?_?_?: ;
            5'b1_0_?_?_?: begin e_alloc = 1; e_it = 1; e_in = 1; e_col = 1; end
            5'b1_1_0_?_?: begin e_upd = mism; e_col = 1; end
            5'b1_1_1_?_1: begin e_upd = 1; e_it = 1; e_col = 1; end
            5'b1_1_1_?_0: ;
          endcase
        end
        chk(nbdt_wr_en == (v && b && pend), "random: write enable");
        if (v && b && pend) chk(int'(nbdt_wr_idx) == lidx && int'(nbdt_wr_dir) == ldir && nbdt_wr_nbd == NBD_W'(n),
                                "random: write index, field, value");
        chk(btb_alloc == e_alloc && btb_update_target == e_upd, "random: BTB requests");
        chk((nbdt_inv_en && nbdt_inv_tkn) == e_it && (nbdt_inv_en && nbdt_inv_nt) == e_in, "random: invalidation");
        @(posedge clk); #1;
        if (v && b) begin pend = e_col; lidx = idx; ldir = tk; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
