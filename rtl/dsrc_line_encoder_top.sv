// dsrc_line_encoder_top: downlink line encoders of a DSRC transmit baseband.
//
// DSRC standards encode the downlink with FM0 (Europe, CEN, 500 kb/s) or
// Manchester (America, ASTM, 27 Mb/s; Japan, ARIB, 4 Mb/s) to keep the line
// signal free of DC. This top places the encoders side by side on one bit
// stream and one bit clock:
//   * sols_fm0_manchester_enc   FM0 or Manchester, every gate reused
//   * fm0_diff_manchester_enc   FM0 or differential Manchester, every gate
//                               reused
//   * diff_manchester_enc       differential Manchester alone
// Each encoder has its own output, which would feed the RF front-end, and
// its own control inputs, which would come from the system controller
// (microprocessor). The modulator, the RF front-end and the controller are
// outside this RTL.
//
// Interface.
//   clk             bit clock, one data bit per period (the bit rate)
//   x               data bit, stable for a whole period from a rising edge
//   sols_mode       0 = FM0, 1 = Manchester (FM0/Manchester encoder)
//   sols_clr_n      active-low clear of that encoder; 1 for FM0, 0 for
//                   Manchester, and pulsed low to initialise it
//   fd_mode         0 = FM0, 1 = differential Manchester (combined encoder)
//   rst             active-high reset of the two differential-capable
//                   encoders
//   fm0_manch_code  line output of the FM0/Manchester encoder
//   fm0_dm_code     line output of the FM0/differential Manchester encoder
//   dm_code         line output of the differential Manchester encoder
//
// Timing. All outputs are combinational in clk: a bit's code is on the line
// during the same clock period in which the bit is presented.
//
// The grouping of the three encoders into one top, with shared clk and x,
// is this design's choice; the published material gives the encoders and
// places the line encoder in the transmit baseband.
module dsrc_line_encoder_top
  import line_code_pkg::*;
(
  input  logic clk,
  input  logic x,
  input  logic sols_mode,
  input  logic sols_clr_n,
  input  logic fd_mode,
  input  logic rst,
  output logic fm0_manch_code,
  output logic fm0_dm_code,
  output logic dm_code
);

  sols_fm0_manchester_enc u_sols (
    .clk   (clk),
    .clr_n (sols_clr_n),
    .mode  (sols_mode_e'(sols_mode)),
    .x     (x),
    .code  (fm0_manch_code)
  );

  fm0_diff_manchester_enc u_fm0_dm (
    .clk  (clk),
    .rst  (rst),
    .mode (fd_mode_e'(fd_mode)),
    .x    (x),
    .code (fm0_dm_code)
  );

  diff_manchester_enc u_dm (
    .clk  (clk),
    .rst  (rst),
    .x    (x),
    .code (dm_code)
  );

endmodule
