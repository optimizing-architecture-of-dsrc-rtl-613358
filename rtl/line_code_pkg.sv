// line_code_pkg: shared types of the DSRC downlink line encoders.
//
// The encoders turn one data bit per period of the bit clock CLK into a
// two-level line signal whose first half-period (CLK high) is called A and
// whose second half-period (CLK low) is called B. Each encoder has a one-bit
// mode input; the enumerations below name its two values so that the
// selection reads the same at every level of the hierarchy.
//
// The value assignments follow the encoders' published mode tables:
// Mode = 0 selects FM0 in both the FM0/Manchester encoder and the
// FM0/differential-Manchester encoder.
package line_code_pkg;

  // Mode input of the FM0/Manchester SOLS encoder (MUX_2 select).
  typedef enum logic {
    SOLS_FM0        = 1'b0,
    SOLS_MANCHESTER = 1'b1
  } sols_mode_e;

  // MODE input of the combined FM0/differential-Manchester encoder.
  typedef enum logic {
    FD_FM0               = 1'b0,
    FD_DIFF_MANCHESTER   = 1'b1
  } fd_mode_e;

endpackage
