// fcmac_pkg: widths and constants shared by the Fuzzy CMAC blocks.
//
// The Fuzzy CMAC works on 16-bit integers throughout, as the design it follows
// does: inputs are unsigned 16-bit values, weights are signed 16-bit values.
// Weights and the desired output are read as fixed point with FRAC_DEF fraction
// bits, so a desired value of 1 is 1 << FRAC_DEF; that scaling, the number of
// layers and the learning-rate shift are this design's own choices.
package fcmac_pkg;

  // Input and weight word widths (16-bit integer representation).
  localparam int unsigned XW_DEF = 16;
  localparam int unsigned WW_DEF = 16;

  // Clusters per input dimension in the main configuration (28 x 27).
  localparam int unsigned NC_I_DEF = 28;
  localparam int unsigned NC_J_DEF = 27;

  // Number of layers (winning neurons per input) and learning-rate shift.
  localparam int unsigned K_DEF        = 4;
  localparam int unsigned LR_SHIFT_DEF = 3;

  // Fraction bits of the weights and of the desired output.
  localparam int unsigned FRAC_DEF = 12;

  // Controller states.
  typedef enum logic [2:0] {
    ST_CLEAR,   // writing zero to every weight after reset
    ST_IDLE,    // waiting for a sample, serving weight read-back
    ST_READ,    // reading the K addressed weights and summing them
    ST_DONE,    // presenting the network output
    ST_UPDATE   // writing the K adjusted weights (training only)
  } ctrl_state_e;

endpackage
