// tb_diff_manchester_enc: self-checking test of the differential Manchester
// encoder.
//
// The expected line follows the coding rule: a level change in every
// mid-bit, and at the bit boundary a change for 0 and none for 1. The
// reference keeps the later-half level of the last bit (0 after reset). Each
// bit is checked in the middle of both half-periods of the clock period in
// which it is presented (zero latency). Runs the bit pattern 1,0,1,0,0,1,1,
// 1,0,0,1 of the coding illustration, random data, a reset in mid-stream and
// an inverted-line decode check.
module tb_diff_manchester_enc;
  localparam int HALF = 5;

  logic clk;
  logic rst = 1'b1;
  logic x = 1'b0;
  logic code;

  int   checks = 0;
  int   failures = 0;
  logic ref_end = 1'b0;

  diff_manchester_enc dut (.clk, .rst, .x, .code);

  initial begin
    clk = 1'b0;
    forever #HALF clk = ~clk;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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
    ea = b ? ref_end : ~ref_end;  // boundary: change only for 0
    eb = ~ea;                     // mid-bit: always a change
    #2 a_seen = code;
    check("former half", a_seen, ea);
    @(negedge clk);
    #3 b_seen = code;
    check("later half", b_seen, eb);
    ref_end = eb;
  endtask

  logic a, b, prev_b, bit_v;
  logic [10:0] pattern = 11'b100_1110_0101; // 1,0,1,0,0,1,1,1,0,0,1 from bit 0
  logic [10:0] decoded;

  initial begin
    // An edge on the asynchronous reset, then release after two clocks.
    rst = 1'b0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_end = 1'b0;
    prev_b = 1'b0;
    // Decode from transitions alone: it must not matter that the line level
    // is unknown to the receiver.
    for (int i = 0; i < 11; i++) begin
      send_bit(pattern[i], a, b);
      decoded[i] = ~(a ^ prev_b);
      prev_b = b;
    end
    check("illustration pattern decodes", decoded == pattern, 1'b1);

    for (int i = 0; i < 300; i++) begin
      bit_v = 1'($urandom);
      send_bit(bit_v, a, b);
      check("decode from transitions", ~(a ^ prev_b), bit_v);
      prev_b = b;
    end

    // Reset in mid-stream.
    // Reset across one clock edge with X = 0, released in mid-bit.
    x = 1'b0;
    rst = 1'b1;
    @(posedge clk);
    #2 rst = 1'b0;
    ref_end = 1'b0;
    send_bit(1'b1, a, b);
    check("after reset, 1 keeps level 0", a, 1'b0);
    for (int i = 0; i < 50; i++) send_bit(1'($urandom), a, b);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
