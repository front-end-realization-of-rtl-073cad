// Self-checking testbench of y_shape_3way.
//
// Drives the 1 Hz enable every 4 clocks (the 4 Hz chip clock) and compares
// the lights and down-count displays every second with the reference model
// in tb_ref_pkg, over whole cycles at several green-time settings, with the
// walk lights disabled, with the current timing differing from the nominal
// one, through an emergency pause, night mode and power off. It also checks
// the display values of the start of a cycle against fixed numbers.
module tb_y_shape_3way;
  import tlc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr = 1'b1;
  logic       tick = 1'b0;
  logic       pwr = 1'b1;
  logic       emg = 1'b0;
  logic       walk = 1'b1;
  logic       night = 1'b0;
  logic       sub = 1'b0;
  logic       mux_c = 1'b1, mux_n = 1'b1;
  logic [1:0] sel_c = 2'd0, sel_n = 2'd0;
  junction_out_t jout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  y_shape_3way dut (
    .clk              (clk),
    .clr              (clr),
    .timer_clk        (tick),
    .ic_power_on_off  (pwr),
    .emrgncy          (emg),
    .walk_enable      (walk),
    .enable_night_mod (night),
    .mux_2x1_ip       (mux_c),
    .clk_div_sel_ip   (sel_c),
    .mux_2x1_nom      (mux_n),
    .clk_div_sel_nom  (sel_n),
    .jout             (jout)
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out_eq(junction_out_t exp, string what);
    checks++;
    if (jout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, jout, exp);
    end
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One second: three idle clocks, then one clock with the enable.
  task automatic one_second();
    repeat (3) @(negedge clk);
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
  endtask

  function automatic int pf(logic m, logic [1:0] s);
    case (s)
      2'd0: return m ? 2 : 1;
      2'd1: return 3;
      2'd2: return 4;
      default: return 6;
    endcase
  endfunction

  // Follow the junction for nsec seconds from second t0 of its cycle.
  task automatic follow(int t0, int nsec, string what);
    jdesc_t dc, dn;
    int ph, s;
    dc = describe(2, sub, pf(mux_c, sel_c));
    dn = describe(2, sub, pf(mux_n, sel_n));
    for (int t = t0; t < t0 + nsec; t++) begin
      locate(dc, t, ph, s);
      expect_out_eq(expect_out(dc, dn, ph, s, walk), what);
      one_second();
    end
  endtask

  // Restart the cycle by switching the power off for one second.
  task automatic restart();
    pwr = 1'b0;
    @(negedge clk);
    expect_out_eq('0, "power off: all dark");
    one_second();
    expect_out_eq('0, "power off: all dark after a second");
    pwr = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    jdesc_t d;
    junction_out_t snap;
    bit on;
    repeat (3) @(negedge clk);
    clr = 1'b0;
    @(negedge clk);

    expect_int(jout.count_green[0], 32, "Y count_green_1 at start");
    expect_int(jout.count_red[1], 32, "Y count_red_2 at start");
    expect_int(jout.count_red[2], 64, "Y count_red_3 at start");
    expect_int(jout.lights[3], 0, "Y road 4 dark");

    // Two cycles at the default 30 s timing.
    d = describe(2, sub, 2);
    follow(0, 2 * cycle_len(d), "default timing");

    // Emergency pause in the middle of a cycle: nothing moves.
    restart();
    follow(0, 20, "before emergency");
    emg  = 1'b1;
    snap = jout;
    for (int i = 0; i < 6; i++) begin
      one_second();
      expect_out_eq(snap, "frozen in emergency");
    end
    emg = 1'b0;
    follow(20, cycle_len(d), "after emergency");

    // Night mode: only the yellow lights, blinking 1 s on / 1 s off.
    night = 1'b1;
    @(negedge clk);
    on = 1'b1;
    for (int i = 0; i < 6; i++) begin
      expect_out_eq(night_out(d, on), "night blink");
      one_second();
      on = !on;
    end
    night = 1'b0;
    @(negedge clk);
    follow(0, cycle_len(d) + 5, "after night, cycle restarts");

    // Walk lights disabled.
    walk = 1'b0;
    restart();
    follow(0, cycle_len(d), "walk disabled");
    walk = 1'b1;

    // Other green times: 15, 45, 60 and 90 s settings.
    for (int c = 0; c < 4; c++) begin
      mux_c = (c != 0);
      sel_c = 2'(c);
      mux_n = mux_c;
      sel_n = sel_c;
      restart();
      d = describe(2, sub, pf(mux_c, sel_c));
      follow(0, cycle_len(d), "scaled timing");
    end

    // Timing in force differs from the nominal one (rush-hour change).
    mux_c = 1'b1; sel_c = 2'd1;
    mux_n = 1'b1; sel_n = 2'd0;
    restart();
    d = describe(2, sub, 3);
    follow(0, cycle_len(d), "current timing differs from nominal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
