// Rush-hour timing scenario on the whole chip (tlc_top at its default sizes).
//
// The real time clock is set inside the morning and evening rush windows
// and the clock distributor reprograms green times while the junction runs:
//   * basic junction, four roads set one after another (mode 10) to 15, 45,
//     60 and 90 s; every green time is measured in clocks, and the green
//     display of a lengthened road is checked;
//   * rush hour ends: every road is back at the nominal 30 s;
//   * evening rush, two roads with different timing (mode 01): road 4
//     gets 90 s, road 2 keeps the nominal 30 s;
//   * T-shape junction with road 3 at 45 s: the main road keeps 60 s.
module tb_rush_timing;
  logic       clk = 1'b0, clr = 1'b1;
  logic       pwr = 1'b1;
  logic [1:0] tsel = 2'd0;
  logic       man = 1'b0, tset = 1'b0;
  logic [5:0] sec_in = '0, min_in = '0;
  logic [4:0] hour_in = '0;
  logic [1:0] nroads = 2'd0;
  logic       diff = 1'b0;
  logic [2:0] comb = 3'd7;
  logic [1:0] timing = 2'd0;
  logic [3:0] o_green, o_green_cross, o_yellow, o_yellow_cross, o_red, o_red_cross, o_walk;
  logic [3:0][7:0] o_cg;
  logic [3:0][8:0] o_cr;
  logic       main_clk;
  logic [5:0] rsec, rmin;
  logic [4:0] rhour;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tlc_top dut (
    .clk (clk), .clr (clr), .ic_power_on_off (pwr), .emrgncy (1'b0), .walk_enable (1'b1),
    .traffic_sel (tsel), .sub_mod_sel (1'b0), .man_auto_mod_sel (man), .time_set_enable (tset),
    .sec_in (sec_in), .min_in (min_in), .hour_in (hour_in),
    .night_mod_begin_hour (5'd22), .night_mod_end_hour (5'd6),
    .morning_rush_mod_begin_hour (5'd7), .morning_rush_mod_end_hour (5'd9),
    .evening_rush_mod_begin_hour (5'd17), .evening_rush_mod_end_hour (5'd19),
    .mux_2x1_ip (1'b1), .clk_div_sel_ip (2'd0), .variable_time_enable (1'b0),
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set_clock(int h);
    man = 1'b1; tset = 1'b1; hour_in = 5'(h); min_in = '0; sec_in = '0;
    @(negedge clk);
    man = 1'b0; tset = 1'b0;
  endtask

  task automatic restart();
    pwr = 1'b0;
    repeat (4) @(negedge clk);
    pwr = 1'b1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Clocks that road r's straight green stays on, from its next start.
  // Two seconds in, its green display must reflect a g + y s phase (green
  // plus yellow; between 1 and 3 s gone, depending on the 1 Hz step phase).
  task automatic green_clocks(int r, int g, output int n, input int y = 2);
    n = 0;
    while (o_green[r-1]) @(negedge clk);
    while (!o_green[r-1]) @(negedge clk);
    while (o_green[r-1]) begin
      n++;
      if (n == 8)
        check(int'(o_cg[r-1]) >= g + y - 3 && int'(o_cg[r-1]) <= g + y - 1,
              $sformatf("road %0d green display %0d for a %0d s green", r, o_cg[r-1], g));
      @(negedge clk);
    end
  endtask

  initial begin
    int n;
    int rr;
    int secs [4];
    secs = '{15, 45, 60, 90};
    repeat (3) @(negedge clk);
    clr = 1'b0;
    @(negedge clk);

    // Morning rush, each road its own green time.
    set_clock(8);
    nroads = 2'b10;
    for (int r = 0; r < 4; r++) begin
      comb = 3'(r); timing = 2'(r);
      repeat (3) @(negedge clk);
    end
    comb = 3'd7;
    restart();
    for (int r = 2; r <= 5; r++) begin
      rr = (r - 1) % 4 + 1;
      green_clocks(rr, secs[rr-1], n);
      expect_int(n, secs[rr-1] * 4, $sformatf("rush, road %0d green clocks", rr));
    end

    // Rush hour over: nominal 30 s everywhere.
    set_clock(9);
    repeat (4) @(negedge clk);
    for (int r = 2; r <= 4; r++) begin
      green_clocks(r, 30, n);
      expect_int(n, 30 * 4, $sformatf("after rush, road %0d green clocks", r));
    end

    // Evening rush, pair 4 & 2 with different timing: road 4 90 s, road 2 30 s.
    set_clock(17);
    nroads = 2'b01; comb = 3'b101; diff = 1'b1; timing = 2'b11;
    restart();
    green_clocks(2, 30, n);
    expect_int(n, 30 * 4, "evening rush, road 2 keeps nominal");
    green_clocks(4, 90, n);
    expect_int(n, 90 * 4, "evening rush, road 4 at 90 s");

    // T-shape junction, road 3 at 45 s, main road stays at 60 s.
    tsel = 2'd3;
    nroads = 2'b00; comb = 3'd2; timing = 2'b01;
    restart();
    green_clocks(3, 45, n);
    expect_int(n, 45 * 4, "T-shape rush, road 3 at 45 s");
    green_clocks(1, 60, n, 4);
    expect_int(n, 60 * 4, "T-shape rush, main road 60 s");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
