// fm0_diff_manchester_enc: combined FM0 / differential Manchester encoder.
//
// One data bit X is encoded per period of the bit clock CLK; the former half
// of the period is CLK high, the later half CLK low.
//   FM0 (MODE = 0):   a level change at every bit boundary; a mid-bit
//                     change only for X = 0.
//   Differential Manchester (MODE = 1): a level change in every mid-bit; a
//                     boundary change only for X = 0.
// Both codes have the same later half, X XOR (level at the end of the last
// bit), and differ only in the former half: the inverted stored level for
// FM0, the inverted later half for differential Manchester.
//
// How it works. One flip-flop holds the line level at the end of the
// previous bit. One XOR forms the later half from it and X. A MODE
// multiplexer picks the stored level (FM0) or the XOR output (differential
// Manchester), one inverter turns it into the former half, and a CLK
// multiplexer puts the former half (CLK high) or the later half (CLK low) on
// the line. The flip-flop takes the later half at the next rising CLK edge.
// Every gate is used in both modes.
//
// Interface.
//   clk   bit clock; clocks the flip-flop and selects the CLK multiplexer
//   rst   asynchronous reset, active high; clears the stored level to 0
//   mode  FD_FM0 (0) or FD_DIFF_MANCHESTER (1); may change at a bit boundary
//   x     data bit, held stable for one whole CLK period from a rising edge
//   code  encoded line signal
//
// Timing. code is combinational in clk, x, mode and the flip-flop: the code
// of a bit appears in the same CLK period it is presented (no latency).
//
// Source and choices. The parts (flip-flop, XOR, inverter, MODE and CLK
// multiplexers), the rst, mode and X inputs and the mode values
// (0 = FM0, 1 = differential Manchester) follow the published design. Own
// choices: the inverter sits after the MODE multiplexer rather than before
// it, which is what lets the FM0 former half be the inverted stored level
// with the same parts; the multiplexer input order; the asynchronous reset;
// and the flip-flop's D input taken from the later-half net, equal to the
// line just before the rising edge, so the flip-flop does not sample a net
// the clock switches at that edge.
module fm0_diff_manchester_enc
  import line_code_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  fd_mode_e mode,
  input  logic     x,
  output logic     code
);

  logic prev_level;   // line level at the end of the previous bit
  logic later_half;   // XOR output
  logic mode_sel;     // MODE multiplexer output
  logic former_half;  // inverter output

  always_comb begin
    later_half  = prev_level ^ x;
    mode_sel    = (mode == FD_DIFF_MANCHESTER) ? later_half : prev_level;
    former_half = ~mode_sel;
    code        = clk ? former_half : later_half;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) prev_level <= 1'b0;
    else     prev_level <= later_half;
  end

endmodule
