// nbdt: next branch distance table (NBDT).
//
// One entry per BTB entry, 2*NBD_W+2 bits wide: tkn_NBD and nt_NBD hold the
// distance to the next branch on the taken and on the not-taken path of the
// branch in the matching BTB entry, tkn_v and nt_v say whether each is valid.
//
// Fetch port: when rd_en is high the entry at rd_idx is read and the field
// matching the predicted direction rd_dir (T or NT) is returned as rd_nbd
// with its valid bit rd_valid; with rd_en low the table is not read and
// rd_valid is 0. EX port: ex_idx returns both valid bits of an entry for the
// collection decisions. Writes (rising clock edge): wr_en stores wr_nbd into
// the field wr_dir of entry wr_idx and sets its valid bit; inv_en clears
// the valid bits selected by inv_tkn / inv_nt in entry inv_idx. If both hit
// the same valid bit in one cycle, the clear wins, because an invalidation
// means the entry now belongs to another branch or target.
//
// The fields, their widths and the set/reset control of the valid bits follow
// the described design; the priority rule and the EX probe port are this
// design's own choices. Only the valid bits are reset (all invalid).
module nbdt #(
  parameter int unsigned ENTRIES = nbd_pkg::DEF_BTB_ENTRIES,
  parameter int unsigned NBD_W   = nbd_pkg::DEF_NBD_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch probe
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  rd_idx,
  input  nbd_pkg::bdir_e    rd_dir,
  output logic [NBD_W-1:0]  rd_nbd,
  output logic              rd_valid,
  // EX probe
  input  logic [IDX_W-1:0]  ex_idx,
  output logic              ex_tkn_v,
  output logic              ex_nt_v,
  // collection write (validate)
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  nbd_pkg::bdir_e    wr_dir,
  input  logic [NBD_W-1:0]  wr_nbd,
  // invalidation
  input  logic              inv_en,
  input  logic [IDX_W-1:0]  inv_idx,
  input  logic              inv_tkn,
  input  logic              inv_nt
);
  import nbd_pkg::*;

  logic [NBD_W-1:0]   tkn_nbd_q [ENTRIES];
  logic [NBD_W-1:0]   nt_nbd_q  [ENTRIES];
  logic [ENTRIES-1:0] tkn_v_q, nt_v_q;

  // Fetch side: T/NT selection by the predicted direction.
  always_comb begin
    if (rd_dir == DIR_T) begin
      rd_nbd   = tkn_nbd_q[rd_idx];
      rd_valid = rd_en && tkn_v_q[rd_idx];
    end else begin
      rd_nbd   = nt_nbd_q[rd_idx];
      rd_valid = rd_en && nt_v_q[rd_idx];
    end
    if (!rd_en) rd_nbd = '0;
  end

  assign ex_tkn_v = tkn_v_q[ex_idx];
  assign ex_nt_v  = nt_v_q[ex_idx];

  always_ff @(posedge clk) begin
    if (wr_en && wr_dir == DIR_T)  tkn_nbd_q[wr_idx] <= wr_nbd;
    if (wr_en && wr_dir == DIR_NT) nt_nbd_q[wr_idx]  <= wr_nbd;
  end

  // Valid bits: set by a collection write, reset by an invalidation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tkn_v_q <= '0;
      nt_v_q  <= '0;
    end else begin
      if (wr_en && wr_dir == DIR_T)  tkn_v_q[wr_idx] <= 1'b1;
      if (wr_en && wr_dir == DIR_NT) nt_v_q[wr_idx]  <= 1'b1;
      if (inv_en && inv_tkn) tkn_v_q[inv_idx] <= 1'b0;
      if (inv_en && inv_nt)  nt_v_q[inv_idx]  <= 1'b0;
    end
  end

endmodule
