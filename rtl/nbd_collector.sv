// nbd_collector: EX-stage NBD collection and NBDT/BTB management.
//
// For every branch resolved in EX (ex_valid && ex_branch) this block does two
// things in the same cycle.
//  1. It closes the collection of the previous branch B1: if B1's collection
//     was allowed (pending), the NBDC value, which is B1's next branch
//     distance, is written into the NBDT entry L_IDX, field L_BDIR, and that
//     field is marked valid.
//  2. It decides for the branch B2 now in EX, from its direction, whether it
//     is in the BTB, the valid bit of the field for its direction and whether
//     the BTB target is wrong:
//       not taken, in BTB, nt_v invalid  -> collect nt_NBD
//       not taken otherwise              -> nothing
//       taken, not in BTB                -> allocate BTB entry, invalidate
//                                           tkn_v and nt_v, collect tkn_NBD
//       taken, in BTB, tkn_v invalid     -> collect tkn_NBD
//       taken, in BTB, tkn_v valid,
//         target mismatch                -> update target, invalidate tkn_v,
//                                           collect tkn_NBD
//       taken, in BTB, tkn_v valid,
//         target correct                 -> nothing
//     "Collect" means B2's index and direction are kept in L_IDX / L_BDIR
//     and its collection is pending until the next branch executes.
// The valid bits used in step 2 see the write of step 1 when both address
// the same field, so a one-branch loop collects its distance only once. The
// NBDT gives an invalidation priority over a same-cycle write.
//
// The decision tree, L_IDX, L_BDIR and the valid set/reset control follow the
// described design. The pending flag, the forwarding of step 1 into step 2,
// and updating a wrong BTB target also while tkn_v is still invalid are this
// design's own choices. Outputs are combinational; L_IDX, L_BDIR and the
// pending flag change at the rising clock edge.
module nbd_collector #(
  parameter int unsigned ENTRIES = nbd_pkg::DEF_BTB_ENTRIES,
  parameter int unsigned NBD_W   = nbd_pkg::DEF_NBD_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // resolved instruction in EX
  input  logic             ex_valid,
  input  logic             ex_branch,
  input  logic             ex_taken,
  // BTB and NBDT probe results for it
  input  logic             ex_btb_hit,
  input  logic [IDX_W-1:0] ex_idx,
  input  logic             ex_target_mismatch,
  input  logic             ex_tkn_v,
  input  logic             ex_nt_v,
  // NBDC value (distance since the previous branch)
  input  logic [NBD_W-1:0] nbd,
  // NBDT write (validate) and invalidate
  output logic             nbdt_wr_en,
  output logic [IDX_W-1:0] nbdt_wr_idx,
  output nbd_pkg::bdir_e   nbdt_wr_dir,
  output logic [NBD_W-1:0] nbdt_wr_nbd,
  output logic             nbdt_inv_en,
  output logic [IDX_W-1:0] nbdt_inv_idx,
  output logic             nbdt_inv_tkn,
  output logic             nbdt_inv_nt,
  // BTB write requests
  output logic             btb_alloc,
  output logic             btb_update_target
);
  import nbd_pkg::*;

  logic [IDX_W-1:0] l_idx_q;
  bdir_e            l_bdir_q;
  logic             pend_q;

  logic  br;
  logic  tkn_v_eff, nt_v_eff;
  logic  collect;
  bdir_e collect_dir;

  assign br = ex_valid && ex_branch;

  // Step 1: close the previous branch's collection.
  assign nbdt_wr_en  = br && pend_q;
  assign nbdt_wr_idx = l_idx_q;
  assign nbdt_wr_dir = l_bdir_q;
  assign nbdt_wr_nbd = nbd;

  assign tkn_v_eff = ex_tkn_v || (nbdt_wr_en && l_idx_q == ex_idx && l_bdir_q == DIR_T);
  assign nt_v_eff  = ex_nt_v  || (nbdt_wr_en && l_idx_q == ex_idx && l_bdir_q == DIR_NT);

  // Step 2: the decision tree for the branch now in EX.
  always_comb begin
    collect           = 1'b0;
    collect_dir       = ex_taken ? DIR_T : DIR_NT;
    btb_alloc         = 1'b0;
    btb_update_target = 1'b0;
    nbdt_inv_en       = 1'b0;
    nbdt_inv_tkn      = 1'b0;
    nbdt_inv_nt       = 1'b0;
    if (br) begin
      if (!ex_taken) begin
        collect = ex_btb_hit && !nt_v_eff;
      end else if (!ex_btb_hit) begin
        btb_alloc    = 1'b1;
        nbdt_inv_en  = 1'b1;
        nbdt_inv_tkn = 1'b1;
        nbdt_inv_nt  = 1'b1;
        collect      = 1'b1;
      end else if (!tkn_v_eff) begin
        btb_update_target = ex_target_mismatch;
        collect           = 1'b1;
      end else if (ex_target_mismatch) begin
        btb_update_target = 1'b1;
        nbdt_inv_en       = 1'b1;
        nbdt_inv_tkn      = 1'b1;
        collect           = 1'b1;
      end
    end
  end

  assign nbdt_inv_idx = ex_idx;

  // A branch either gets a new BTB entry or a new target, never both, and
  // only a taken branch changes the BTB.
  a_one_btb_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(btb_alloc && btb_update_target));
  a_btb_write_taken: assert property (@(posedge clk) disable iff (!rst_n)
    (btb_alloc || btb_update_target) |-> br && ex_taken);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q   <= 1'b0;
      l_idx_q  <= '0;
      l_bdir_q <= DIR_NT;
    end else if (br) begin
      pend_q   <= collect;
      l_idx_q  <= ex_idx;
      l_bdir_q <= collect_dir;
    end
  end

endmodule
