// tb_dsrc_line_encoder_top: end-to-end test of the DSRC line encoders.
//
// One random bit stream drives all three encoders of the top through a
// scripted session: initialisation by clear and reset, FM0 and Manchester
// on the FM0/Manchester encoder, FM0 and differential Manchester on the
// combined encoder, several mode switches of each, and a reset of the
// differential encoders in mid-stream. Every output is checked in both
// half-periods of every bit against reference models written from the
// coding rules. The test counts how often each mechanism was exercised
// (each code, each mode switch, clear/reset, data 0 and 1) and fails any
// that never happened. The top has no parameters, so this is also the
// full-size run.
module tb_dsrc_line_encoder_top;
  localparam int HALF = 5;

  logic clk;
  logic x = 1'b0;
  logic sols_mode = 1'b0;
  logic sols_clr_n = 1'b1;
  logic fd_mode = 1'b0;
  logic rst = 1'b0;
  logic fm0_manch_code, fm0_dm_code, dm_code;

  int checks = 0;
  int failures = 0;

  // Reference state: level of the last later half seen by each encoder.
  logic end_sols = 1'b0, end_fd = 1'b0, end_dm = 1'b0;

  // Mechanism counters.
  int n_fm0_sols = 0, n_manch = 0, n_fm0_fd = 0, n_dm_fd = 0, n_dm = 0;
  int n_sols_switch = 0, n_fd_switch = 0, n_clear = 0, n_reset = 0;
  int n_zero = 0, n_one = 0;

  dsrc_line_encoder_top dut (.*);

  initial begin
    clk = 1'b0;
    forever #HALF clk = ~clk;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Expected (former half, later half) for a bit under a given code.
  function automatic logic [1:0] fm0_ref(logic prev, logic b);
    logic a = ~prev;
    return {a, b ? a : ~a};
  endfunction
  function automatic logic [1:0] manch_ref(logic b);
    return {~b, b};
  endfunction
  function automatic logic [1:0] dm_ref(logic prev, logic b);
    logic a = b ? prev : ~prev;
    return {a, ~a};
  endfunction

  // release_clr: release the FM0/Manchester encoder's clear in mid-bit
  // (its stored level is 0 for this bit).
  task automatic send_bit(logic b, logic release_clr = 1'b0);
    logic [1:0] e_sols, e_fd, e_dm;
    @(posedge clk);
    #1 x = b;
    if (release_clr) begin
      sols_clr_n = 1'b1;
      n_clear++;
    end
    e_sols = sols_mode ? manch_ref(b) : fm0_ref(end_sols, b);
    e_fd   = fd_mode ? dm_ref(end_fd, b) : fm0_ref(end_fd, b);
    e_dm   = dm_ref(end_dm, b);
    #2;
    check("FM0/Manchester former half", fm0_manch_code, e_sols[1]);
    check("FM0/DM former half", fm0_dm_code, e_fd[1]);
    check("DM former half", dm_code, e_dm[1]);
    @(negedge clk);
    #3;
    check("FM0/Manchester later half", fm0_manch_code, e_sols[0]);
    check("FM0/DM later half", fm0_dm_code, e_fd[0]);
    check("DM later half", dm_code, e_dm[0]);
    end_sols = sols_clr_n ? e_sols[0] : 1'b0;
    end_fd   = e_fd[0];
    end_dm   = e_dm[0];
    if (sols_mode) n_manch++; else n_fm0_sols++;
    if (fd_mode) n_dm_fd++; else n_fm0_fd++;
    n_dm++;
    if (b) n_one++; else n_zero++;
  endtask

  // Clear the FM0/Manchester encoder and reset the others across one edge
  // with X = 0, releasing in mid-bit; all stored levels become 0.
  task automatic initialise(logic release_clr);
    x = 1'b0;
    #1;                       // both start released, so this is an edge
    sols_clr_n = 1'b0;
    rst = 1'b1;
    @(posedge clk);
    #2;
    rst = 1'b0;
    sols_clr_n = release_clr;
    end_sols = 1'b0;
    end_fd = 1'b0;
    end_dm = 1'b0;
    n_clear++;
    n_reset++;
  endtask

  initial begin
    initialise(1'b1);                      // FM0 on both mode-capable encoders
    for (int seg = 0; seg < 16; seg++) begin
      for (int i = 0; i < 60; i++) send_bit(1'($urandom));
      // Switch the combined encoder every segment; it needs no clear.
      fd_mode = ~fd_mode;
      n_fd_switch++;
      // Switch the FM0/Manchester encoder every other segment.
      if (seg % 2 == 1) begin
        if (sols_mode == 1'b0) begin
          sols_clr_n = 1'b0;               // Manchester: Mode = 1, CLR = 0
          sols_mode = 1'b1;
        end else begin
          sols_mode = 1'b0;                // FM0: Mode = 0, CLR = 1, the
          send_bit(1'($urandom), 1'b1);    // clear released in the next bit
        end
        n_sols_switch++;
      end
      if (seg == 9) initialise(~sols_mode);
    end

    check("FM0 on FM0/Manchester encoder", n_fm0_sols > 0, 1'b1);
    check("Manchester", n_manch > 0, 1'b1);
    check("FM0 on combined encoder", n_fm0_fd > 0, 1'b1);
    check("differential Manchester on combined encoder", n_dm_fd > 0, 1'b1);
    check("standalone differential Manchester", n_dm > 0, 1'b1);
    check("FM0/Manchester mode switches", n_sols_switch >= 2, 1'b1);
    check("FM0/DM mode switches", n_fd_switch >= 2, 1'b1);
    check("clear", n_clear > 1, 1'b1);
    check("reset", n_reset > 1, 1'b1);
    check("data 0 and 1", n_zero > 0 && n_one > 0, 1'b1);
    $display("mechanisms: FM0(sols)=%0d Manchester=%0d FM0(fd)=%0d DM(fd)=%0d DM=%0d",
             n_fm0_sols, n_manch, n_fm0_fd, n_dm_fd, n_dm);
    $display("            sols switches=%0d fd switches=%0d clears=%0d resets=%0d zeros=%0d ones=%0d",
             n_sols_switch, n_fd_switch, n_clear, n_reset, n_zero, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
