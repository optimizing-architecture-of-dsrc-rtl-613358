// diff_manchester_enc: differential Manchester line encoder.
//
// One data bit X is encoded per period of the bit clock CLK. The line always
// changes level in mid-bit (CLK falling); at the start of the bit (CLK
// rising) it changes level for X = 0 and keeps its level for X = 1. Only the
// presence of transitions carries data, so the code survives an inverted
// line.
//
// How it works. A flip-flop holds the line level of the last later half
// (CLK low) of the previous bit. An XOR of that level with X gives the
// later-half level of the current bit; an inverter gives the former-half
// level, and a multiplexer selected by CLK puts the former half (CLK high)
// or the later half (CLK low) on the line. The flip-flop takes the later-half
// level at the next rising edge of CLK.
//
// Interface.
//   clk   bit clock; clocks the flip-flop on its rising edge and selects the
//         output multiplexer
//   rst   asynchronous reset, active high; clears the stored line level to 0
//   x     data bit, held stable for one whole CLK period from a rising edge
//   code  encoded line signal
//
// Timing. code is combinational in clk, x and the flip-flop: the code of a
// bit appears in the same CLK period the bit is presented (no latency).
//
// Source and choices. The four parts (flip-flop, XOR with the data bit,
// inverter, CLK multiplexer) and the rst input follow the published encoder.
// Which multiplexer input is taken while CLK is high is this design's
// choice: the inverted XOR output, so that X = 0 gives the start-of-bit
// transition. The other convention (a transition for X = 1) is obtained by
// swapping the two multiplexer inputs. The reset is asynchronous, an own
// choice. The flip-flop's D input is the later-half level itself, the value
// the multiplexer output has just before the rising edge, so that the
// flip-flop does not sample a net the clock switches at that edge.
module diff_manchester_enc (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic code
);

  logic prev_level;  // line level at the end of the previous bit
  logic later_half;  // XOR output: later-half level of this bit

  always_comb begin
    later_half = prev_level ^ x;
    code       = clk ? ~later_half : later_half;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) prev_level <= 1'b0;
    else     prev_level <= later_half;
  end

endmodule
