// End-to-end testbench of the traffic light controller chip (tlc_top).
//
// Runs the chip with its default sizes from the 4 Hz clock. The seconds
// output of the real time clock marks each 1 Hz step. The testbench:
//   * sets the time of day manually, then takes each junction type
//     (basic, class-2 normal and special, Y, T) through a whole cycle,
//     comparing all 36 outputs every clock with the tb_ref_pkg model;
//   * pauses the basic junction with Emrgncy and checks that nothing moves;
//   * lets the clock run into the night window (yellow blinking only) and
//     out of it again (cycle restarts with road 1);
//   * measures green times in clocks: nominal 15 s via the clock inputs,
//     a road given 90 s during the morning rush hour, two roads given 15 s
//     with Variable_Time_Enable;
//   * checks power off and the main clock rate.
// Each mechanism is counted; one that never happened is a failure.
module tb_tlc_top;
  import tlc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, clr = 1'b1;
  logic       pwr = 1'b1, emg = 1'b0, walk_en = 1'b1;
  logic [1:0] tsel = 2'd0;
  logic       sub = 1'b0, man = 1'b0, tset = 1'b0;
  logic [5:0] sec_in = '0, min_in = '0;
  logic [4:0] hour_in = '0;
  logic [4:0] nb = 5'd22, ne = 5'd6, mb = 5'd7, me = 5'd9, eb = 5'd17, ee = 5'd19;
  logic       mux_ip = 1'b1;
  logic [1:0] sel_ip = 2'd0;
  logic       vte = 1'b0;
  logic [1:0] nroads = 2'd0;
  logic       diff = 1'b0;
  logic [2:0] comb = 3'd0;
  logic [1:0] timing = 2'd0;
  logic [3:0] o_green, o_green_cross, o_yellow, o_yellow_cross, o_red, o_red_cross, o_walk;
  logic [3:0][7:0] o_cg;
  logic [3:0][8:0] o_cr;
  logic       main_clk;
  logic [5:0] rsec, rmin;
  logic [4:0] rhour;

  int checks = 0, failures = 0;
  int m_junction [5];
  int m_walk_blink = 0, m_emergency = 0, m_night = 0, m_rush = 0, m_vary = 0;
  int m_nominal = 0, m_power_off = 0, m_rtc_set = 0, m_main_clk = 0;

  always #5 clk = ~clk;

  tlc_top dut (
    .clk (clk), .clr (clr), .ic_power_on_off (pwr), .emrgncy (emg), .walk_enable (walk_en),
    .traffic_sel (tsel), .sub_mod_sel (sub), .man_auto_mod_sel (man), .time_set_enable (tset),
    .sec_in (sec_in), .min_in (min_in), .hour_in (hour_in),
    .night_mod_begin_hour (nb), .night_mod_end_hour (ne),
    .morning_rush_mod_begin_hour (mb), .morning_rush_mod_end_hour (me),
    .evening_rush_mod_begin_hour (eb), .evening_rush_mod_end_hour (ee),
    .mux_2x1_ip (mux_ip), .clk_div_sel_ip (sel_ip), .variable_time_enable (vte),
    .no_of_roads_time_var (nroads), .tworoad_timing_same_diff (diff),
    .road_timing_combination (comb), .timing (timing),
    .green_1(o_green[0]),
    .green_cross_1(o_green_cross[0]),
    .yellow_1(o_yellow[0]),
    .yellow_cross_1(o_yellow_cross[0]),
    .red_1(o_red[0]),
    .red_cross_1(o_red_cross[0]),
    .walk_1(o_walk[0]),
    .count_green_1(o_cg[0]),
    .count_red_1(o_cr[0]),
    .green_2(o_green[1]),
    .green_cross_2(o_green_cross[1]),
    .yellow_2(o_yellow[1]),
    .yellow_cross_2(o_yellow_cross[1]),
    .red_2(o_red[1]),
    .red_cross_2(o_red_cross[1]),
    .walk_2(o_walk[1]),
    .count_green_2(o_cg[1]),
    .count_red_2(o_cr[1]),
    .green_3(o_green[2]),
    .green_cross_3(o_green_cross[2]),
    .yellow_3(o_yellow[2]),
    .yellow_cross_3(o_yellow_cross[2]),
    .red_3(o_red[2]),
    .red_cross_3(o_red_cross[2]),
    .walk_3(o_walk[2]),
    .count_green_3(o_cg[2]),
    .count_red_3(o_cr[2]),
    .green_4(o_green[3]),
    .green_cross_4(o_green_cross[3]),
    .yellow_4(o_yellow[3]),
    .yellow_cross_4(o_yellow_cross[3]),
    .red_4(o_red[3]),
    .red_cross_4(o_red_cross[3]),
    .walk_4(o_walk[3]),
    .count_green_4(o_cg[3]),
    .count_red_4(o_cr[3]),
    .clk_main_out (main_clk), .rtc_sec (rsec), .rtc_min (rmin), .rtc_hour (rhour)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic junction_out_t outs();
    junction_out_t o;
    for (int k = 0; k < 4; k++) begin
      o.lights[k].green = o_green[k];
      o.lights[k].green_cross = o_green_cross[k];
      o.lights[k].yellow = o_yellow[k];
      o.lights[k].yellow_cross = o_yellow_cross[k];
      o.lights[k].red = o_red[k];
      o.lights[k].red_cross = o_red_cross[k];
      o.lights[k].walk = o_walk[k];
      o.count_green[k] = o_cg[k];
      o.count_red[k]   = o_cr[k];
    end
    return o;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set_clock(int h, int m, int s);
    man = 1'b1; tset = 1'b1;
    hour_in = 5'(h); min_in = 6'(m); sec_in = 6'(s);
    @(negedge clk);
    man = 1'b0; tset = 1'b0;
    check(rhour == 5'(h) && rmin == 6'(m) && rsec == 6'(s), "manual clock setting");
    m_rtc_set++;
  endtask

  task automatic restart();
    pwr = 1'b0;
    repeat (5) @(negedge clk);
    check(outs() == '0, "power off darkens all outputs");
    m_power_off++;
    pwr = 1'b1;
  endtask

  // Compare every clock with the model for nsec seconds from second 0,
  // with an emergency pause of pause_len seconds starting at second pause_at.
  task automatic follow(int sel, bit sb, int p, int nsec, int pause_at, int pause_len);
    jdesc_t d;
    int t, ph, s, paused;
    logic [5:0] last_sec;
    junction_out_t snap;
    d = describe(sel, sb, p);
    t = 0; paused = 0;
    last_sec = rsec;
    while (t < nsec) begin
      @(negedge clk);
      if (rsec != last_sec) begin
        last_sec = rsec;
        if (emg) paused++;
        else t++;
        if (t == pause_at && !emg && paused == 0) begin
          emg = 1'b1;
          snap = outs();
        end
        if (emg && paused == pause_len) begin
          emg = 1'b0;
          m_emergency++;
        end
      end
      if (emg) check(outs() == snap, "frozen during emergency");
      else begin
        locate(d, t, ph, s);
        check(outs() == expect_out(d, d, ph, s, walk_en), $sformatf("junction %0d sub %0d second %0d got %h exp %h", sel, sb, t, outs(), expect_out(d, d, ph, s, walk_en)));
      end
      if (o_green[0] && !o_walk[0] && walk_en) m_walk_blink++;
    end
  endtask

  // Clocks that road r's straight green stays on, from its next start.
  task automatic green_clocks(int r, output int n);
    n = 0;
    while (o_green[r-1]) @(negedge clk);
    while (!o_green[r-1]) @(negedge clk);
    while (o_green[r-1]) begin n++; @(negedge clk); end
  endtask

  initial begin
    int n, pulses;
    for (int i = 0; i < 5; i++) m_junction[i] = 0;
    repeat (3) @(negedge clk);
    clr = 1'b0;
    @(negedge clk);
    set_clock(12, 0, 0);

    // Every junction type through a whole cycle at the default timing.
    for (int sel = 0; sel < 4; sel++) begin
      tsel = 2'(sel);
      restart();
      follow(sel, 1'b0, 2, cycle_len(describe(sel, 1'b0, 2)) + 3, (sel == 0) ? 10 : -1, 5);
      m_junction[sel]++;
    end
    tsel = 2'd1; sub = 1'b1;
    restart();
    follow(1, 1'b1, 2, cycle_len(describe(1, 1'b1, 2)) + 3, -1, 0);
    m_junction[4]++;
    sub = 1'b0;

    // Clock main output at the default 30 s selection: every 2nd clock.
    pulses = 0;
    for (int i = 0; i < 120; i++) begin @(negedge clk); if (main_clk) pulses++; end
    expect_int(pulses, 60, "main clock pulses in 120 clocks");
    m_main_clk++;

    // Nominal timing 15 s via the clock selection inputs (basic junction).
    tsel = 2'd0; mux_ip = 1'b0; sel_ip = 2'd0;
    restart();
    green_clocks(2, n);
    expect_int(n, 15 * 4, "green time with the 15 s clock selection");
    m_nominal++;
    mux_ip = 1'b1;

    // Night window: from 21:59:58 the clock runs into night mode.
    set_clock(21, 59, 58);
    repeat (3 * 4) @(negedge clk);
    begin
      int toggles;
      logic last_y;
      toggles = 0;
      last_y  = o_yellow[0];
      for (int i = 0; i < 8 * 4; i++) begin
        @(negedge clk);
        check(o_green == '0 && o_red == '0 && o_walk == '0 && o_cg == '0 && o_cr == '0, "night: only yellow");
        check(o_yellow == {4{o_yellow[0]}}, "night: all yellow together");
        if (o_yellow[0] != last_y) toggles++;
        last_y = o_yellow[0];
      end
      expect_int(toggles, 8, "night: yellow toggles once a second");
      if (toggles > 0) m_night++;
    end
    set_clock(6, 0, 0);
    @(negedge clk);
    check(o_green[0] && !o_green[1] && o_red[1], "after night: cycle restarts with road 1");

    // Morning rush hour: road 2 gets 90 s green, the others keep 30 s.
    set_clock(7, 0, 0);
    nroads = 2'b00; comb = 3'd1; timing = 2'b11;
    restart();
    green_clocks(2, n);
    expect_int(n, 90 * 4, "rush hour: road 2 green time");
    green_clocks(3, n);
    expect_int(n, 30 * 4, "rush hour: road 3 green time");
    m_rush++;

    // Variable_Time_Enable outside rush hour: roads 3 and 2 get 15 s.
    set_clock(12, 0, 0);
    vte = 1'b1; nroads = 2'b01; comb = 3'b011; diff = 1'b0; timing = 2'b00;
    restart();
    green_clocks(2, n);
    expect_int(n, 15 * 4, "variable timing: road 2 green time");
    green_clocks(3, n);
    expect_int(n, 15 * 4, "variable timing: road 3 green time");
    green_clocks(1, n);   // next cycle: the first second after power-on is partial
    expect_int(n, 30 * 4, "variable timing: road 1 green time");
    m_vary++;
    vte = 1'b0;

    check(m_junction[0] > 0, "basic junction exercised");
    check(m_junction[1] > 0, "class-2 junction exercised");
    check(m_junction[2] > 0, "Y-shape junction exercised");
    check(m_junction[3] > 0, "T-shape junction exercised");
    check(m_junction[4] > 0, "special class-2 exercised");
    check(m_walk_blink > 0, "walk blink seen");
    check(m_emergency > 0, "emergency pause exercised");
    check(m_night > 0, "night mode exercised");
    check(m_rush > 0, "rush hour timing exercised");
    check(m_vary > 0, "variable timing exercised");
    check(m_nominal > 0, "nominal timing change exercised");
    check(m_power_off > 0, "power off exercised");
    check(m_rtc_set > 0, "clock setting exercised");
    check(m_main_clk > 0, "main clock checked");
    $display("mechanisms: junctions %0d %0d %0d %0d special %0d walk-blink clocks %0d emergency %0d night %0d rush %0d variable %0d nominal %0d power-off %0d clock-set %0d",
             m_junction[0], m_junction[1], m_junction[2], m_junction[3], m_junction[4], m_walk_blink,
             m_emergency, m_night, m_rush, m_vary, m_nominal, m_power_off, m_rtc_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
