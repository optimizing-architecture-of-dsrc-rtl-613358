// tb_dsrc_standards: the three DSRC downlink profiles at their real bit rates.
//
//   CEN  (Europe)   FM0         500 kb/s  (bit period 2000 ns)
//   ARIB (Japan)    Manchester  4 Mb/s    (bit period 250 ns)
//   ASTM (America)  Manchester  27 Mb/s   (bit period 37.037 ns)
//
// For each profile the top is configured (mode and clear of the
// FM0/Manchester encoder; the combined encoder in FM0 for the CEN profile),
// 128 random bits are sent with X changing exactly at the rising clock edge,
// and the line is checked in the middle of both half periods against the
// coding rules. Every change of the line must happen at a clock edge, and
// the measured bit rate must match the profile within 0.1 %.
module tb_dsrc_standards;
  // Delays are in ns: build with a 1ns/1ps time scale.

  localparam int NBITS = 128;

  logic clk;
  logic x = 1'b0;
  logic sols_mode = 1'b0;
  logic sols_clr_n = 1'b1;
  logic fd_mode = 1'b0;
  logic rst = 1'b0;
  logic fm0_manch_code, fm0_dm_code, dm_code;

  int  checks = 0;
  int  failures = 0;
  real half = 1000.0;
  bit  clk_on = 1'b0;
  realtime t_start;      // clock start; edges at t_start + n * half
  int  off_edge;
  int  line_changes;

  dsrc_line_encoder_top dut (.*);

  initial begin
    clk = 1'b0;
    forever begin
      wait (clk_on);
      #(half) clk = ~clk;
    end
  end

  // Any line change must coincide with a clock edge (zero-delay RTL).
  always @(fm0_manch_code or fm0_dm_code or dm_code) begin
    real k;
    if (clk_on) begin
      line_changes++;
      k = ($realtime - t_start) / half;
      if (k - $floor(k + 0.5) > 1.0e-3 || $floor(k + 0.5) - k > 1.0e-3) off_edge++;
    end
  end

  initial begin : watchdog
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $realtime, got, exp);
    end
  endtask

  // Run one profile: manchester selects Manchester on the FM0/Manchester
  // encoder, otherwise FM0 on both mode-capable encoders.
  task automatic run_profile(string name, real bit_ns, logic manchester, real rate_bps);
    logic e_end, f_end, d_end, b, ea, eb;
    realtime t0, t1;
    real measured;
    clk_on = 1'b0;
    half = $floor(bit_ns / 2.0 * 1000.0 + 0.5) / 1000.0;  // whole ps
    // Initialise with the clock stopped low.
    // rst and the clear are released here (or the clear is already held for
    // Manchester), so asserting them gives the asynchronous inputs an edge.
    x = 1'b0;
    #1;
    rst = 1'b1;
    sols_clr_n = 1'b0;
    sols_mode = manchester;
    fd_mode = 1'b0;
    #1;
    rst = 1'b0;
    sols_clr_n = ~manchester;
    e_end = 1'b0;
    f_end = 1'b0;
    d_end = 1'b0;
    off_edge = 0;
    line_changes = 0;
    t_start = $realtime;
    clk_on = 1'b1;
    @(posedge clk);
    t0 = $realtime;
    for (int i = 0; i < NBITS; i++) begin
      b = 1'($urandom);
      x <= b;
      #(half / 2.0);
      check({name, " differential Manchester former half"}, dm_code, b ? d_end : ~d_end);
      if (manchester) begin
        check({name, " Manchester former half"}, fm0_manch_code, ~b);
      end else begin
        check({name, " FM0 former half"}, fm0_manch_code, ~e_end);
        check({name, " FM0 former half, combined"}, fm0_dm_code, ~f_end);
      end
      @(negedge clk);
      #(half / 2.0);
      check({name, " differential Manchester later half"}, dm_code, b ? ~d_end : d_end);
      d_end = b ? ~d_end : d_end;
      if (manchester) begin
        check({name, " Manchester later half"}, fm0_manch_code, b);
      end else begin
        ea = ~e_end;
        eb = b ? ea : ~ea;
        check({name, " FM0 later half"}, fm0_manch_code, eb);
        check({name, " FM0 later half, combined"}, fm0_dm_code, b ? ~f_end : f_end);
        e_end = eb;
        f_end = b ? ~f_end : f_end;
      end
      @(posedge clk);
    end
    t1 = $realtime;
    clk_on = 1'b0;
    measured = real'(NBITS) / ((t1 - t0) * 1.0e-9);
    $display("%s: %0d bits in %0.3f ns, %0.1f bit/s, %0d line changes",
             name, NBITS, t1 - t0, measured, line_changes);
    checks++;
    if (measured < rate_bps * 0.999 || measured > rate_bps * 1.001) begin
      failures++;
      $display("FAIL %s bit rate %0.1f, expected %0.1f", name, measured, rate_bps);
    end
    checks++;
    if (off_edge != 0 || line_changes == 0) begin
      failures++;
      $display("FAIL %s: %0d of %0d line changes away from a clock edge", name,
               off_edge, line_changes);
    end
    // Let the clock generator finish its last half period.
    #(bit_ns);
  endtask

  initial begin
    run_profile("CEN 500 kb/s", 2000.0, 1'b0, 500.0e3);
    run_profile("ARIB 4 Mb/s", 250.0, 1'b1, 4.0e6);
    run_profile("ASTM 27 Mb/s", 1000.0 / 27.0, 1'b1, 27.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
