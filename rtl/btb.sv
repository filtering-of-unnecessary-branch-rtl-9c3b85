// btb: direct-mapped branch target buffer with a gated fetch lookup.
//
// Each entry holds a valid bit, a tag (the PC bits above the index) and the
// branch target address (TAdd). The fetch port is read only when lk_en is
// high; with lk_en low nothing is read and lk_hit is 0, which is how the
// lookup filter suppresses a BTB access. The EX port probes the entry of a
// resolved branch (hit, stored target and index) so that the collection
// logic can decide what to do, and writes it back the next clock edge:
// wr_alloc installs a new branch (valid, tag, target), wr_target only
// replaces the target. Reads are combinational from the current contents,
// writes take effect at the rising clock edge; a write and a read of the same
// entry in one cycle return the old contents.
//
// The organisation (512 entries, direct mapped, tag compare, target RAM)
// follows the evaluated configuration; the EX probe port, the full tag and the
// reset of the valid bits only are this design's own choices.
module btb #(
  parameter int unsigned PC_W    = nbd_pkg::DEF_PC_W,
  parameter int unsigned ENTRIES = nbd_pkg::DEF_BTB_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned TAG_LO = IDX_W + nbd_pkg::INST_SHIFT,
  localparam int unsigned TAG_W  = PC_W - TAG_LO
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch lookup
  input  logic              lk_en,
  input  logic [PC_W-1:0]   lk_pc,
  output logic              lk_hit,
  output logic [PC_W-1:0]   lk_target,
  // EX-stage probe
  input  logic [PC_W-1:0]   ex_pc,
  output logic              ex_hit,
  output logic [PC_W-1:0]   ex_target,
  output logic [IDX_W-1:0]  ex_idx,
  // EX-stage write
  input  logic              wr_alloc,
  input  logic              wr_target,
  input  logic [PC_W-1:0]   wr_pc,
  input  logic [PC_W-1:0]   wr_tgt
);

  logic [ENTRIES-1:0] valid_q;
  logic [TAG_W-1:0]   tag_q [ENTRIES];
  logic [PC_W-1:0]    tadd_q [ENTRIES];

  logic [IDX_W-1:0] lk_idx, wr_idx;

  assign lk_idx = lk_pc[TAG_LO-1:nbd_pkg::INST_SHIFT];
  assign ex_idx = ex_pc[TAG_LO-1:nbd_pkg::INST_SHIFT];
  assign wr_idx = wr_pc[TAG_LO-1:nbd_pkg::INST_SHIFT];

  // Fetch port: tag comparator, gated by the lookup enable.
  always_comb begin
    lk_hit    = lk_en && valid_q[lk_idx] && (tag_q[lk_idx] == lk_pc[PC_W-1:TAG_LO]);
    lk_target = lk_hit ? tadd_q[lk_idx] : '0;
  end

  always_comb begin
    ex_hit    = valid_q[ex_idx] && (tag_q[ex_idx] == ex_pc[PC_W-1:TAG_LO]);
    ex_target = tadd_q[ex_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (wr_alloc) begin
      valid_q[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_alloc) begin
      tag_q[wr_idx] <= wr_pc[PC_W-1:TAG_LO];
    end
    if (wr_alloc || wr_target) begin
      tadd_q[wr_idx] <= wr_tgt;
    end
  end

endmodule
