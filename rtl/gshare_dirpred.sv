// gshare_dirpred: gshare branch direction predictor (Dir-Pred).
//
// A table of 2-bit saturating counters is indexed by the word address of the
// PC XORed with a global history register of the same width. The fetch port
// is read only when lk_en is high; with lk_en low the table is not read and
// lk_taken is 0 (static not-taken). lk_idx, the index the lookup used, is
// always produced so the pipeline can carry it to EX, where upd_en trains the
// counter at upd_idx with the resolved direction and shifts that direction
// into the history. Training and history are therefore non-speculative.
// Reads are combinational, updates take effect at the rising clock edge.
//
// Only "gshare, 16K entries" comes from the evaluated configuration; the
// counter width, history handling and update point are this design's own
// choices. Like the SRAM it stands for, the counter table is not reset: every
// 2-bit value is a legal counter state, so the predictor simply starts from
// whatever the table holds. Only the history register is reset.
module gshare_dirpred #(
  parameter int unsigned PC_W    = nbd_pkg::DEF_PC_W,
  parameter int unsigned ENTRIES = nbd_pkg::DEF_DIR_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lk_en,
  input  logic [PC_W-1:0]  lk_pc,
  output logic             lk_taken,
  output logic [IDX_W-1:0] lk_idx,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic             upd_taken
);

  logic [1:0]       ctr_q [ENTRIES];
  logic [IDX_W-1:0] ghr_q;

  assign lk_idx   = lk_pc[IDX_W+nbd_pkg::INST_SHIFT-1:nbd_pkg::INST_SHIFT] ^ ghr_q;
  assign lk_taken = lk_en && ctr_q[lk_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ghr_q <= '0;
    else if (upd_en) ghr_q <= {ghr_q[IDX_W-2:0], upd_taken};
  end

  // Counter table: read-modify-write of one 2-bit saturating counter.
  always_ff @(posedge clk) begin
    if (upd_en) begin
      if (upd_taken && ctr_q[upd_idx] != 2'b11) ctr_q[upd_idx] <= ctr_q[upd_idx] + 2'd1;
      else if (!upd_taken && ctr_q[upd_idx] != 2'b00) ctr_q[upd_idx] <= ctr_q[upd_idx] - 2'd1;
    end
  end

endmodule
