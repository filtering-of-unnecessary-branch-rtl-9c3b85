// nbd_frontend: pipeline front end whose branch predictor lookups are
// filtered by collected next branch distances (NBDs).
//
// Fetch (IF): the PC addresses the BTB, the gshare direction predictor and the
// NBDT together, but only when EN is 1. On a BTB hit the predicted direction
// picks the taken or not-taken NBD, which the next lookup filter loads into
// ER; for the following ER instructions EN is 0 and none of the three tables
// is read, and the next PC is PC+4 (static not-taken). With EN = 1 the next
// PC is the BTB target when the BTB hits and gshare predicts taken, else PC+4.
//
// Execute (EX): the enclosing pipeline presents each resolved instruction
// (ex_valid) with its PC, whether it is a branch, its direction and target,
// and the predicted next PC and gshare index carried from fetch. The NBDC
// counts non-branch instructions; on each branch the collector stores the
// counted distance for the previous branch and applies the BTB/NBDT
// management rules; gshare is trained. If the actual next PC differs from the
// predicted one, ex_mispredict is raised in that cycle: the PC is redirected
// at the next edge, ER is reset and EN set, and the enclosing pipeline must
// squash everything younger than the EX instruction.
//
// if_advance says that the instruction in IF is taken by decode this cycle;
// when low, PC, ER and EN hold. All state changes at the rising clock edge;
// reset is asynchronous and active low. if_pc, if_lookup_en and the if_pred_*
// outputs are valid in the same cycle.
//
// The structure (Fig.-1-style front end with BTB, Dir-Pred, NBDT, next lookup
// filter, EN and the EX-stage NBDC) and its sizes follow the described
// design; the port protocol towards the rest of the pipeline, the 4-byte
// instruction size and the reset PC are this design's own choices.
module nbd_frontend #(
  parameter int unsigned PC_W        = nbd_pkg::DEF_PC_W,
  parameter int unsigned BTB_ENTRIES = nbd_pkg::DEF_BTB_ENTRIES,
  parameter int unsigned DIR_ENTRIES = nbd_pkg::DEF_DIR_ENTRIES,
  parameter int unsigned NBD_W       = nbd_pkg::DEF_NBD_W,
  parameter logic [PC_W-1:0] RESET_PC = '0,
  localparam int unsigned BTB_IDX_W  = $clog2(BTB_ENTRIES),
  localparam int unsigned DIR_IDX_W  = $clog2(DIR_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fetch
  input  logic                 if_advance,
  output logic [PC_W-1:0]      if_pc,
  output logic                 if_lookup_en,
  output logic                 if_pred_taken,
  output logic [PC_W-1:0]      if_pred_npc,
  output logic [DIR_IDX_W-1:0] if_dir_idx,
  // resolution in EX
  input  logic                 ex_valid,
  input  logic [PC_W-1:0]      ex_pc,
  input  logic                 ex_branch,
  input  logic                 ex_taken,
  input  logic [PC_W-1:0]      ex_target,
  input  logic [PC_W-1:0]      ex_pred_npc,
  input  logic [DIR_IDX_W-1:0] ex_dir_idx,
  output logic                 ex_mispredict,
  output logic [PC_W-1:0]      ex_actual_npc
);
  import nbd_pkg::*;

  localparam logic [PC_W-1:0] INST_BYTES = PC_W'(1) << INST_SHIFT;

  // ---------------------------------------------------------------- fetch
  logic                 en;
  logic                 btb_hit;
  logic [PC_W-1:0]      btb_tadd;
  logic                 pred_tkn;
  logic [BTB_IDX_W-1:0] if_btb_idx;
  logic [NBD_W-1:0]     sel_nbd;
  logic                 sel_valid;

  // EX-side signals used by the tables
  logic                 ex_btb_hit;
  logic [PC_W-1:0]      ex_btb_target;
  logic [BTB_IDX_W-1:0] ex_btb_idx;
  logic                 ex_tkn_v, ex_nt_v;
  logic                 btb_alloc, btb_update_target;
  logic                 nbdt_wr_en, nbdt_inv_en, nbdt_inv_tkn, nbdt_inv_nt;
  logic [BTB_IDX_W-1:0] nbdt_wr_idx, nbdt_inv_idx;
  bdir_e                nbdt_wr_dir;
  logic [NBD_W-1:0]     nbdt_wr_nbd;
  logic [NBD_W-1:0]     nbd_count;

  assign if_lookup_en = en;
  assign if_btb_idx   = if_pc[BTB_IDX_W+INST_SHIFT-1:INST_SHIFT];

  btb #(.PC_W(PC_W), .ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .lk_en     (en),
    .lk_pc     (if_pc),
    .lk_hit    (btb_hit),
    .lk_target (btb_tadd),
    .ex_pc     (ex_pc),
    .ex_hit    (ex_btb_hit),
    .ex_target (ex_btb_target),
    .ex_idx    (ex_btb_idx),
    .wr_alloc  (btb_alloc),
    .wr_target (btb_update_target),
    .wr_pc     (ex_pc),
    .wr_tgt    (ex_target)
  );

  gshare_dirpred #(.PC_W(PC_W), .ENTRIES(DIR_ENTRIES)) u_dirpred (
    .clk, .rst_n,
    .lk_en     (en),
    .lk_pc     (if_pc),
    .lk_taken  (pred_tkn),
    .lk_idx    (if_dir_idx),
    .upd_en    (ex_valid && ex_branch),
    .upd_idx   (ex_dir_idx),
    .upd_taken (ex_taken)
  );

  nbdt #(.ENTRIES(BTB_ENTRIES), .NBD_W(NBD_W)) u_nbdt (
    .clk, .rst_n,
    .rd_en    (en),
    .rd_idx   (if_btb_idx),
    .rd_dir   (pred_tkn ? DIR_T : DIR_NT),
    .rd_nbd   (sel_nbd),
    .rd_valid (sel_valid),
    .ex_idx   (ex_btb_idx),
    .ex_tkn_v (ex_tkn_v),
    .ex_nt_v  (ex_nt_v),
    .wr_en    (nbdt_wr_en),
    .wr_idx   (nbdt_wr_idx),
    .wr_dir   (nbdt_wr_dir),
    .wr_nbd   (nbdt_wr_nbd),
    .inv_en   (nbdt_inv_en),
    .inv_idx  (nbdt_inv_idx),
    .inv_tkn  (nbdt_inv_tkn),
    .inv_nt   (nbdt_inv_nt)
  );

  next_lookup_filter #(.NBD_W(NBD_W)) u_filter (
    .clk, .rst_n,
    .advance   (if_advance),
    .flush     (ex_mispredict),
    .hit       (btb_hit),
    .nbd       (sel_nbd),
    .nbd_valid (sel_valid),
    .en        (en),
    .next_en   (),
    .er        ()
  );

  // Next-PC selection: the BTB target only if the (enabled) BTB hits and the
  // (enabled) direction predictor says taken; otherwise the sequential PC.
  assign if_pred_taken = btb_hit && pred_tkn;
  assign if_pred_npc   = if_pred_taken ? btb_tadd : if_pc + INST_BYTES;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             if_pc <= RESET_PC;
    else if (ex_mispredict) if_pc <= ex_actual_npc;
    else if (if_advance)    if_pc <= if_pred_npc;
  end

  // A filtered fetch must read nothing: no hit, no taken prediction, no NBD.
  a_filtered_reads_nothing: assert property (@(posedge clk) disable iff (!rst_n)
    !en |-> !btb_hit && !pred_tkn && !sel_valid);

  // ---------------------------------------------------------------- execute
  assign ex_actual_npc = (ex_branch && ex_taken) ? ex_target : ex_pc + INST_BYTES;
  assign ex_mispredict = ex_valid && (ex_actual_npc != ex_pred_npc);

  nbdc #(.NBD_W(NBD_W)) u_nbdc (
    .clk, .rst_n,
    .step      (ex_valid),
    .is_branch (ex_branch),
    .count     (nbd_count),
    .saturated ()
  );

  nbd_collector #(.ENTRIES(BTB_ENTRIES), .NBD_W(NBD_W)) u_collector (
    .clk, .rst_n,
    .ex_valid           (ex_valid),
    .ex_branch          (ex_branch),
    .ex_taken           (ex_taken),
    .ex_btb_hit         (ex_btb_hit),
    .ex_idx             (ex_btb_idx),
    .ex_target_mismatch (ex_btb_target != ex_target),
    .ex_tkn_v           (ex_tkn_v),
    .ex_nt_v            (ex_nt_v),
    .nbd                (nbd_count),
    .nbdt_wr_en         (nbdt_wr_en),
    .nbdt_wr_idx        (nbdt_wr_idx),
    .nbdt_wr_dir        (nbdt_wr_dir),
    .nbdt_wr_nbd        (nbdt_wr_nbd),
    .nbdt_inv_en        (nbdt_inv_en),
    .nbdt_inv_idx       (nbdt_inv_idx),
    .nbdt_inv_tkn       (nbdt_inv_tkn),
    .nbdt_inv_nt        (nbdt_inv_nt),
    .btb_alloc          (btb_alloc),
    .btb_update_target  (btb_update_target)
  );

endmodule
