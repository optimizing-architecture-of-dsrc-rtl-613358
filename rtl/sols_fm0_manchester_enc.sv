// sols_fm0_manchester_enc: fully reused FM0 / Manchester line encoder.
//
// One data bit X is encoded per period of the bit clock CLK. The period is
// split in a former half A (CLK high) and a later half B (CLK low).
//   FM0:        A(t) = ~B(t-1),  B(t) = X ^ B(t-1)
//               (a level change at every bit boundary, and one in mid-bit
//               only for X = 0)
//   Manchester: code = X ^ CLK   (A = ~X, B = X)
//
// How it works. Similarity-oriented logic simplification (SOLS) makes both
// codes use every gate:
//   * area-compact retiming: a single flip-flop DFF_B sits on the encoder
//     output and holds B(t-1), the line level of the last later half;
//   * balance logic-operation sharing: the A leg is MUX_2 (Mode selects
//     B(t-1) for FM0 or X for Manchester) followed by an inverter; the B leg
//     is X XNOR B(t-1) followed by the same inverter. For Manchester the
//     clear input holds DFF_B at 0, so the B leg yields X.
//   * MUX_1, selected by CLK, picks the A leg (CLK = 1) or the B leg
//     (CLK = 0); the shared inverter sits on the MUX_1 output, which balances
//     the delay of the two legs.
//
// Interface.
//   clk    bit clock CLK; clocks DFF_B on its rising edge and selects MUX_1
//   clr_n  CLR, asynchronous clear of DFF_B, active low: 1 for FM0, 0 for
//          Manchester, and pulsed low once to initialise the encoder
//   mode   SOLS_FM0 (0) or SOLS_MANCHESTER (1)
//   x      data bit, to be held stable for one whole CLK period starting at a
//          rising edge of clk
//   code   encoded line signal
//
// Timing. code is combinational in clk, x, mode and DFF_B: the code of a bit
// appears in the same CLK period the bit is presented (no latency). DFF_B
// takes, at each rising edge, the value the line had just before it, which
// is the B leg (CLK low).
//
// Source and choices. The gate structure, the mode table (FM0: Mode = 0,
// CLR = 1; Manchester: Mode = 1, CLR = 0) and the equations follow the
// published SOLS architecture. Own choices: the clear is asynchronous; and
// the D input of DFF_B is wired to the B leg rather than to the MUX_1 output.
// Both nets carry the same value while CLK is low, i.e. at the sampling
// edge, so the function is the same, but the flip-flop then does not sample
// a net that the clock itself switches at that edge (a hold-time race in
// hardware and an ordering race in simulation). clk deliberately serves as
// both clock and data (MUX_1 select), as in the architecture.
module sols_fm0_manchester_enc
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       clr_n,
  input  sols_mode_e mode,
  input  logic       x,
  output logic       code
);

  logic b_prev;     // Q of DFF_B: B(t-1)
  logic mux2_out;   // A leg before the shared inverter: ~A(t) or X
  logic xnor_out;   // B leg before the shared inverter: ~B(t) or ~X
  logic mux1_out;   // selected leg before the shared inverter

  always_comb begin
    mux2_out = (mode == SOLS_MANCHESTER) ? x : b_prev;
    xnor_out = ~(x ^ b_prev);
    mux1_out = clk ? mux2_out : xnor_out;
    code     = ~mux1_out;
  end

  // DFF_B with active-low clear; captures the later-half line level.
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) b_prev <= 1'b0;
    else        b_prev <= ~xnor_out;
  end

  // Manchester needs DFF_B held clear (mode table: Mode = 1 and CLR = 0).
  always_comb begin
    if (mode == SOLS_MANCHESTER)
      a_manchester_needs_clear: assert final (!clr_n)
        else $error("Manchester mode selected while CLR is released");
  end

endmodule
