// next_lookup_filter: enable register ER, Next_en and the lookup enable EN.
//
// ER holds how many more non-branch instructions are expected before the next
// branch on the predicted path. For every instruction that leaves fetch
// (advance high):
//   - if the BTB hit (the instruction is a branch), ER is loaded with the NBD
//     read from the NBDT for the predicted direction when that NBD is valid,
//     and with the default distance 0 otherwise;
//   - otherwise ER counts down, stopping at 0.
// Next_en = (new ER == 0) is latched into EN, which enables (EN = 1) or
// filters (EN = 0) the BTB, direction predictor and NBDT lookups of the next
// fetched instruction. A branch misprediction (flush) resets ER to 0 and sets
// EN, so the first instruction on the corrected path is looked up.
// Reset leaves ER = 0 and EN = 1. Combinational from inputs to next_en;
// ER and EN change at the rising clock edge.
//
// The ER datapath, the eq-0 test and the misprediction reset follow the
// described design. Holding ER and EN while fetch stalls, stopping the count
// at 0 and setting EN on a flush are this design's own choices.
module next_lookup_filter #(
  parameter int unsigned NBD_W = nbd_pkg::DEF_NBD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,
  input  logic             flush,
  input  logic             hit,
  input  logic [NBD_W-1:0] nbd,
  input  logic             nbd_valid,
  output logic             en,
  output logic             next_en,
  output logic [NBD_W-1:0] er
);

  logic [NBD_W-1:0] er_next, er_dec;

  assign er_dec = (er == '0) ? '0 : er - 1'b1;

  always_comb begin
    if (hit) er_next = nbd_valid ? nbd : '0;
    else     er_next = er_dec;
  end

  assign next_en = (er_next == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      er <= '0;
      en <= 1'b1;
    end else if (flush) begin
      er <= '0;
      en <= 1'b1;
    end else if (advance) begin
      er <= er_next;
      en <= next_en;
    end
  end

endmodule
