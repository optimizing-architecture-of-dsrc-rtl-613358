// tb_fm0_diff_manchester_enc: self-checking test of the combined FM0 /
// differential Manchester encoder.
//
// Expected levels come from the two coding rules. FM0: a level change at
// every bit boundary, a mid-bit change only for 0. Differential Manchester:
// a mid-bit change always, a boundary change only for 0. The reference keeps
// the later-half level of the last bit (0 after reset). Both halves of each
// bit are checked in the clock period the bit is presented. Runs random data
// in each mode (MODE = 0 and MODE = 1), mode switches at bit boundaries, and
// a reset in mid-stream.
module tb_fm0_diff_manchester_enc;
  import line_code_pkg::*;

  localparam int HALF = 5;

  logic     clk;
  logic     rst = 1'b1;
  fd_mode_e mode = FD_FM0;
  logic     x = 1'b0;
  logic     code;

  int   checks = 0;
  int   failures = 0;
  logic ref_end = 1'b0;

  fm0_diff_manchester_enc dut (.clk, .rst, .mode, .x, .code);

  initial begin
    clk = 1'b0;
    forever #HALF clk = ~clk;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic send_bit(logic b, output logic a_seen, output logic b_seen);
    logic ea, eb;
    @(posedge clk);
    #1 x = b;
    if (mode == FD_FM0) begin
      ea = ~ref_end;              // boundary change always
      eb = b ? ea : ~ea;          // mid-bit change only for 0
    end else begin
      ea = b ? ref_end : ~ref_end; // boundary change only for 0
      eb = ~ea;                    // mid-bit change always
    end
    #2 a_seen = code;
    check(mode == FD_FM0 ? "FM0 former half" : "DM former half", a_seen, ea);
    @(negedge clk);
    #3 b_seen = code;
    check(mode == FD_FM0 ? "FM0 later half" : "DM later half", b_seen, eb);
    ref_end = eb;
  endtask

  logic a, b;
  int   switches = 0;
  logic [4:0] bits_v = 5'b10110;  // 0,1,1,0,1 from bit 0
  logic [9:0] wave;

  initial begin
    // An edge on the asynchronous reset, then release after two clocks.
    rst = 1'b0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_end = 1'b0;

    // Fixed prefix: FM0 of 0,1,1,0,1 from level 0 gives 10 11 00 10 11.
    begin
      for (int i = 0; i < 5; i++) begin
        send_bit(bits_v[i], a, b);
        wave[9-2*i] = a;
        wave[8-2*i] = b;
      end
      check("FM0 example waveform", wave == 10'b10_11_00_10_11, 1'b1);
    end

    for (int blk = 0; blk < 12; blk++) begin
      // still in the later half of the last bit: the switch takes effect at
      // the next bit boundary
      mode = (mode == FD_FM0) ? FD_DIFF_MANCHESTER : FD_FM0;
      switches++;
      for (int i = 0; i < 40; i++) send_bit(1'($urandom), a, b);
    end

    // Reset across one clock edge with X = 0, released in mid-bit.
    x = 1'b0;
    rst = 1'b1;
    @(posedge clk);
    #2 rst = 1'b0;
    ref_end = 1'b0;
    for (int i = 0; i < 30; i++) send_bit(1'($urandom), a, b);

    check("mode switches happened", switches >= 2, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
