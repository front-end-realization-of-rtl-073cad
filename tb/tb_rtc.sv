// Self-checking testbench of rtc.
//
// Keeps its own count of the time of day and compares it with the clock
// after every second pulse, across minute, hour and midnight roll-overs;
// checks manual setting (only with both Man_Auto_Mod_sel and
// Time_Set_Enable high, out-of-range values load 0) and the night and rush
// windows, including a night window that wraps over midnight and an empty
// window, for every hour of the day.
module tb_rtc;
  logic       clk = 1'b0;
  logic       clr = 1'b1;
  logic       tick = 1'b0;
  logic       man = 1'b0, tset = 1'b0;
  logic [5:0] sec_in = '0, min_in = '0;
  logic [4:0] hour_in = '0;
  logic [4:0] nb = 5'd22, ne = 5'd6, mb = 5'd7, me = 5'd9, eb = 5'd17, ee = 5'd19;
  logic [5:0] sec, min;
  logic [4:0] hour;
  logic       night, rush;
  int checks = 0, failures = 0;
  int t_ref;   // seconds since midnight, the reference

  always #5 clk = ~clk;

  rtc dut (
    .clk (clk), .clr (clr), .sec_tick (tick),
    .man_auto_mod_sel (man), .time_set_enable (tset),
    .sec_in (sec_in), .min_in (min_in), .hour_in (hour_in),
    .night_mod_begin_hour (nb), .night_mod_end_hour (ne),
    .morning_rush_mod_begin_hour (mb), .morning_rush_mod_end_hour (me),
    .evening_rush_mod_begin_hour (eb), .evening_rush_mod_end_hour (ee),
    .sec (sec), .min (min), .hour (hour),
    .night_mod_enable (night), .rush_mod_enable (rush)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_time(string what);
    expect_int(int'(hour) * 3600 + int'(min) * 60 + int'(sec), t_ref, what);
  endtask

  task automatic pulse();
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    t_ref = (t_ref + 1) % 86400;
  endtask

  task automatic set_time(int h, int m, int s);
    man = 1'b1; tset = 1'b1;
    hour_in = 5'(h); min_in = 6'(m); sec_in = 6'(s);
    @(negedge clk);
    tset = 1'b0;
    t_ref = h * 3600 + m * 60 + s;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    clr = 1'b0;
    t_ref = 0;
    check_time("reset time 00:00:00");
    for (int i = 0; i < 3700; i++) begin
      pulse();
      check_time("auto counting");
    end
    // No pulse, no change.
    repeat (5) @(negedge clk);
    check_time("holds between pulses");

    // Time_Set_Enable alone (auto mode) does not set the clock.
    man = 1'b0; tset = 1'b1; hour_in = 5'd12; min_in = 6'd0; sec_in = 6'd0;
    @(negedge clk);
    tset = 1'b0;
    check_time("set ignored in auto mode");

    // Manual set, then midnight roll-over.
    set_time(23, 59, 55);
    check_time("manual set 23:59:55");
    man = 1'b0;
    for (int i = 0; i < 10; i++) begin
      pulse();
      check_time("midnight roll-over");
    end

    // Setting holds the clock while Time_Set_Enable stays high.
    man = 1'b1; tset = 1'b1; hour_in = 5'd5; min_in = 6'd6; sec_in = 6'd7;
    tick = 1'b1;
    repeat (3) @(negedge clk);
    tick = 1'b0; tset = 1'b0;
    t_ref = 5 * 3600 + 6 * 60 + 7;
    check_time("held while setting");

    // Out-of-range values load as 0.
    set_time(23, 0, 0);
    man = 1'b1; tset = 1'b1; hour_in = 5'd30; min_in = 6'd61; sec_in = 6'd63;
    @(negedge clk);
    tset = 1'b0;
    t_ref = 0;
    check_time("out-of-range set loads 0");

    // Windows for every hour: night 22..5 (wraps), rush 7..8 and 17..18.
    for (int h = 0; h < 24; h++) begin
      set_time(h, 30, 0);
      expect_int(int'(night), int'(h >= 22 || h < 6), $sformatf("night at %0d h", h));
      expect_int(int'(rush), int'((h >= 7 && h < 9) || (h >= 17 && h < 19)), $sformatf("rush at %0d h", h));
    end
    // Empty and non-wrapping night window.
    nb = 5'd3; ne = 5'd3;
    set_time(3, 0, 0);
    expect_int(int'(night), 0, "empty night window");
    nb = 5'd1; ne = 5'd4;
    set_time(3, 0, 0);
    expect_int(int'(night), 1, "night 1..3 at 3 h");
    set_time(4, 0, 0);
    expect_int(int'(night), 0, "night 1..3 at 4 h");
    // Night starts when the hour rolls over.
    set_time(0, 59, 59);
    expect_int(int'(night), 0, "before night start");
    man = 1'b0;
    pulse();
    expect_int(int'(night), 1, "night starts at 01:00:00");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
