// nbd_pkg: constants and types shared by the next-branch-distance (NBD)
// lookup-filtering front end.
//
// The default sizes are those of the evaluated configuration: a 512-entry
// direct-mapped BTB, a 16K-entry gshare direction predictor and 9-bit NBD
// fields. The 32-bit PC with 4-byte instructions is this design's own choice.
package nbd_pkg;

  localparam int unsigned DEF_PC_W        = 32;
  localparam int unsigned DEF_BTB_ENTRIES = 512;
  localparam int unsigned DEF_DIR_ENTRIES = 16384;
  localparam int unsigned DEF_NBD_W       = 9;

  // Instructions are 4 bytes; the low two PC bits are always zero.
  localparam int unsigned INST_SHIFT = 2;

  // Branch direction, as held in L_BDIR and used to pick an NBDT field.
  typedef enum logic {
    DIR_NT = 1'b0,
    DIR_T  = 1'b1
  } bdir_e;

endpackage
