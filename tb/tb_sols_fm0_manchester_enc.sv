// tb_sols_fm0_manchester_enc: self-checking test of the FM0/Manchester
// encoder.
//
// The expected line levels come from the coding rules, not from the gate
// structure: FM0 changes level at every bit boundary and in mid-bit only for
// a 0; Manchester is X XOR CLK. The encoder's stored level is modelled as
// the last later-half level, forced to 0 while the clear is asserted. Each
// bit is checked in the middle of both half-periods of the clock period in
// which it is presented (zero latency). Runs the published FM0 and
// Manchester example sequences (0,1,1,0,1), random data in both modes, mode
// switches, and an asynchronous clear in the middle of an FM0 stream.
module tb_sols_fm0_manchester_enc;
  import line_code_pkg::*;

  localparam int HALF = 5;

  logic       clk;
  logic       clr_n = 1'b0;
  sols_mode_e mode = SOLS_FM0;
  logic       x = 1'b0;
  logic       code;

  int  checks = 0;
  int  failures = 0;
  logic ref_end = 1'b0;   // modelled content of DFF_B
  logic line_prev;        // later-half level of the previous bit (for rules)

  sols_fm0_manchester_enc dut (.clk, .clr_n, .mode, .x, .code);

  initial begin
    clk = 1'b0;
    forever #HALF clk = ~clk;
  end

  initial begin : watchdog
    repeat (4000) @(posedge clk);
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

  // Present one bit for one clock period and check both halves.
  task automatic send_bit(logic b, output logic a_seen, output logic b_seen);
    logic ea, eb;
    @(posedge clk);
    #1 x = b;
    if (mode == SOLS_MANCHESTER) begin
      ea = ~b;            // X xor CLK, CLK = 1
      eb = b;             // X xor CLK, CLK = 0
    end else begin
      ea = ~ref_end;      // rule 3: change at the boundary
      eb = b ? ea : ~ea;  // rules 1 and 2
    end
    #2 a_seen = code;
    check("former half", a_seen, ea);
    @(negedge clk);
    #3 b_seen = code;
    check("later half", b_seen, eb);
    ref_end = clr_n ? eb : 1'b0;
  endtask

  task automatic send_fm0_stream(int n);
    logic a, b, bit_v;
    for (int i = 0; i < n; i++) begin
      bit_v = 1'($urandom);
      send_bit(bit_v, a, b);
      // rule 3 against the real line, rules 1/2 inside the bit
      check("FM0 boundary transition", a, ~line_prev);
      check("FM0 mid-bit rule", a ^ b, ~bit_v);
      line_prev = b;
    end
  endtask

  logic a, b;
  logic [4:0] ex_bits = 5'b10110; // published example, first bit in bit 0: 0,1,1,0,1
  logic [9:0] fm0_wave;           // A,B pairs of the example, up to polarity
  logic [9:0] man_wave;

  initial begin
    // Initialise with a clear pulse (an edge on the asynchronous clear),
    // then FM0.
    clr_n = 1'b1;
    #1 clr_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 clr_n = 1'b1;
    ref_end = 1'b0;

    // Published FM0 example: levels 01 00 11 01 00 (or all inverted).
    for (int i = 0; i < 5; i++) begin
      send_bit(ex_bits[i], a, b);
      fm0_wave[9-2*i] = a;
      fm0_wave[8-2*i] = b;
    end
    checks++;
    if (!(fm0_wave == 10'b01_00_11_01_00 || fm0_wave == 10'b10_11_00_10_11)) begin
      failures++;
      $display("FAIL FM0 example waveform %b", fm0_wave);
    end
    line_prev = b;
    send_fm0_stream(150);

    // Manchester: Mode = 1, CLR = 0.
    clr_n = 1'b0;
    mode  = SOLS_MANCHESTER;
    for (int i = 0; i < 5; i++) begin
      send_bit(ex_bits[i], a, b);
      man_wave[9-2*i] = a;
      man_wave[8-2*i] = b;
    end
    check("Manchester example waveform", man_wave == 10'b10_01_01_10_01, 1'b1);
    for (int i = 0; i < 150; i++) begin
      send_bit(1'($urandom), a, b);
      check("Manchester mid-bit transition", a ^ b, 1'b1);
    end

    // Back to FM0: X = 0 over one edge, then release the clear in mid-bit;
    // DFF_B starts from 0.
    mode  = SOLS_FM0;
    x = 1'b0;
    @(posedge clk);
    #2 clr_n = 1'b1;
    ref_end = 1'b0;
    send_bit(1'b1, a, b);
    check("FM0 after clear, former half", a, 1'b1);
    line_prev = b;
    send_fm0_stream(100);

    // Asynchronous clear in mid-bit re-initialises DFF_B.
    x = 1'b0;
    clr_n = 1'b0;
    @(posedge clk);
    #2 clr_n = 1'b1;
    ref_end = 1'b0;
    send_bit(1'b0, a, b);
    check("former half after async clear", a, 1'b1);
    check("later half after async clear", b, 1'b0);
    line_prev = b;
    send_fm0_stream(50);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
