// Traffic light controller chip: four junction controllers, a settable
// real time clock and time-of-day timing control.
//
// The chip runs from a single 4 Hz clock (clk). The clock divider derives a
// 1 Hz timer enable for all sequencing and the main clock enable picked by
// the timing code. The real time clock raises night mode (all lights dark,
// yellow blinking) and rush mode during hour windows set at the pins. Rush
// mode, or Variable_Time_Enable, lets the clock distributor give chosen
// roads a different green time; it picks the code of the road whose red is
// off, which it sees through the red outputs fed back from the pins. All
// four junction controllers (basic four-way, class-2 four-way, Y-shape and
// T-shape three-way) run in parallel and Traffic_Sel picks the one that
// drives the 36 light and down-count outputs.
//
// Ports follow the chip's pin list. clk_main_out (the divider's selected
// main clock enable) and the RTC time (rtc_sec/rtc_min/rtc_hour) are extra
// observation outputs of this design. clr is an asynchronous active-high
// reset; ic_power_on_off = 0 darkens all outputs. All outputs change on
// clk edges; lights and counts step once per second.
module tlc_top
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       ic_power_on_off,
  input  logic       emrgncy,
  input  logic       walk_enable,
  input  logic [1:0] traffic_sel,
  input  logic       sub_mod_sel,
  input  logic       man_auto_mod_sel,
  input  logic       time_set_enable,
  input  logic [5:0] sec_in,
  input  logic [5:0] min_in,
  input  logic [4:0] hour_in,
  input  logic [4:0] night_mod_begin_hour,
  input  logic [4:0] night_mod_end_hour,
  input  logic [4:0] morning_rush_mod_begin_hour,
  input  logic [4:0] morning_rush_mod_end_hour,
  input  logic [4:0] evening_rush_mod_begin_hour,
  input  logic [4:0] evening_rush_mod_end_hour,
  input  logic       mux_2x1_ip,
  input  logic [1:0] clk_div_sel_ip,
  input  logic       variable_time_enable,
  input  logic [1:0] no_of_roads_time_var,
  input  logic       tworoad_timing_same_diff,
  input  logic [2:0] road_timing_combination,
  input  logic [1:0] timing,
  output logic       green_cross_1,
  output logic       green_cross_2,
  output logic       green_cross_3,
  output logic       green_cross_4,
  output logic       green_1,
  output logic       green_2,
  output logic       green_3,
  output logic       green_4,
  output logic       yellow_cross_1,
  output logic       yellow_cross_2,
  output logic       yellow_cross_3,
  output logic       yellow_cross_4,
  output logic       yellow_1,
  output logic       yellow_2,
  output logic       yellow_3,
  output logic       yellow_4,
  output logic       red_cross_1,
  output logic       red_cross_2,
  output logic       red_cross_3,
  output logic       red_cross_4,
  output logic       red_1,
  output logic       red_2,
  output logic       red_3,
  output logic       red_4,
  output logic       walk_1,
  output logic       walk_2,
  output logic       walk_3,
  output logic       walk_4,
  output logic [7:0] count_green_1,
  output logic [7:0] count_green_2,
  output logic [7:0] count_green_3,
  output logic [7:0] count_green_4,
  output logic [8:0] count_red_1,
  output logic [8:0] count_red_2,
  output logic [8:0] count_red_3,
  output logic [8:0] count_red_4,
  output logic       clk_main_out,
  output logic [5:0] rtc_sec,
  output logic [5:0] rtc_min,
  output logic [4:0] rtc_hour
);
  logic       timer_clk;
  logic       night_mod_enable, rush_mod_enable;
  logic       dist_mux_2x1;
  logic [1:0] dist_clk_div_sel;
  logic [NROADS-1:0] red_fb;
  junction_out_t jo [4];
  junction_out_t sel_out;

  clk_divider u_clk_divider (
    .clk            (clk),
    .clr            (clr),
    .mux_2x1_ip     (dist_mux_2x1),
    .clk_div_sel_ip (dist_clk_div_sel),
    .clk_main_out   (clk_main_out),
    .timer_clk      (timer_clk)
  );

  rtc u_rtc (
    .clk                         (clk),
    .clr                         (clr),
    .sec_tick                    (timer_clk),
    .man_auto_mod_sel            (man_auto_mod_sel),
    .time_set_enable             (time_set_enable),
    .sec_in                      (sec_in),
    .min_in                      (min_in),
    .hour_in                     (hour_in),
    .night_mod_begin_hour        (night_mod_begin_hour),
    .night_mod_end_hour          (night_mod_end_hour),
    .morning_rush_mod_begin_hour (morning_rush_mod_begin_hour),
    .morning_rush_mod_end_hour   (morning_rush_mod_end_hour),
    .evening_rush_mod_begin_hour (evening_rush_mod_begin_hour),
    .evening_rush_mod_end_hour   (evening_rush_mod_end_hour),
    .sec                         (rtc_sec),
    .min                         (rtc_min),
    .hour                        (rtc_hour),
    .night_mod_enable            (night_mod_enable),
    .rush_mod_enable             (rush_mod_enable)
  );

  clk_distributor u_clk_distributor (
    .clk                      (clk),
    .clr                      (clr),
    .variable_time_enable     (variable_time_enable),
    .rush_mod_enable          (rush_mod_enable),
    .no_of_roads_time_var     (no_of_roads_time_var),
    .tworoad_timing_same_diff (tworoad_timing_same_diff),
    .road_timing_combination  (road_timing_combination),
    .timing                   (timing),
    .mux_2x1_ip               (mux_2x1_ip),
    .clk_div_sel_ip           (clk_div_sel_ip),
    .red                      (red_fb),
    .mux_2x1                  (dist_mux_2x1),
    .clk_div_sel              (dist_clk_div_sel)
  );

  basic_4way u_basic_4way (
    .clk(clk), .clr(clr), .timer_clk(timer_clk), .ic_power_on_off(ic_power_on_off),
    .emrgncy(emrgncy), .walk_enable(walk_enable), .enable_night_mod(night_mod_enable),
    .mux_2x1_ip(dist_mux_2x1), .clk_div_sel_ip(dist_clk_div_sel),
    .mux_2x1_nom(mux_2x1_ip), .clk_div_sel_nom(clk_div_sel_ip), .jout(jo[0])
  );

  class2_4way u_class2_4way (
    .clk(clk), .clr(clr), .timer_clk(timer_clk), .ic_power_on_off(ic_power_on_off),
    .emrgncy(emrgncy), .walk_enable(walk_enable), .enable_night_mod(night_mod_enable),
    .sub_mod_sel(sub_mod_sel),
    .mux_2x1_ip(dist_mux_2x1), .clk_div_sel_ip(dist_clk_div_sel),
    .mux_2x1_nom(mux_2x1_ip), .clk_div_sel_nom(clk_div_sel_ip), .jout(jo[1])
  );

  y_shape_3way u_y_shape_3way (
    .clk(clk), .clr(clr), .timer_clk(timer_clk), .ic_power_on_off(ic_power_on_off),
    .emrgncy(emrgncy), .walk_enable(walk_enable), .enable_night_mod(night_mod_enable),
    .mux_2x1_ip(dist_mux_2x1), .clk_div_sel_ip(dist_clk_div_sel),
    .mux_2x1_nom(mux_2x1_ip), .clk_div_sel_nom(clk_div_sel_ip), .jout(jo[2])
  );

  t_shape_3way u_t_shape_3way (
    .clk(clk), .clr(clr), .timer_clk(timer_clk), .ic_power_on_off(ic_power_on_off),
    .emrgncy(emrgncy), .walk_enable(walk_enable), .enable_night_mod(night_mod_enable),
    .mux_2x1_ip(dist_mux_2x1), .clk_div_sel_ip(dist_clk_div_sel),
    .mux_2x1_nom(mux_2x1_ip), .clk_div_sel_nom(clk_div_sel_ip), .jout(jo[3])
  );

  output_mux_bank u_output_mux_bank (
    .traffic_sel (traffic_sel),
    .jin         (jo),
    .jout        (sel_out)
  );

  for (genvar k = 0; k < NROADS; k++) begin : g_red_fb
    assign red_fb[k] = sel_out.lights[k].red;
  end

  assign green_cross_1 = sel_out.lights[0].green_cross;
  assign green_1 = sel_out.lights[0].green;
  assign yellow_cross_1 = sel_out.lights[0].yellow_cross;
  assign yellow_1 = sel_out.lights[0].yellow;
  assign red_cross_1 = sel_out.lights[0].red_cross;
  assign red_1 = sel_out.lights[0].red;
  assign walk_1 = sel_out.lights[0].walk;
  assign count_green_1 = sel_out.count_green[0];
  assign count_red_1 = sel_out.count_red[0];
  assign green_cross_2 = sel_out.lights[1].green_cross;
  assign green_2 = sel_out.lights[1].green;
  assign yellow_cross_2 = sel_out.lights[1].yellow_cross;
  assign yellow_2 = sel_out.lights[1].yellow;
  assign red_cross_2 = sel_out.lights[1].red_cross;
  assign red_2 = sel_out.lights[1].red;
  assign walk_2 = sel_out.lights[1].walk;
  assign count_green_2 = sel_out.count_green[1];
  assign count_red_2 = sel_out.count_red[1];
  assign green_cross_3 = sel_out.lights[2].green_cross;
  assign green_3 = sel_out.lights[2].green;
  assign yellow_cross_3 = sel_out.lights[2].yellow_cross;
  assign yellow_3 = sel_out.lights[2].yellow;
  assign red_cross_3 = sel_out.lights[2].red_cross;
  assign red_3 = sel_out.lights[2].red;
  assign walk_3 = sel_out.lights[2].walk;
  assign count_green_3 = sel_out.count_green[2];
  assign count_red_3 = sel_out.count_red[2];
  assign green_cross_4 = sel_out.lights[3].green_cross;
  assign green_4 = sel_out.lights[3].green;
  assign yellow_cross_4 = sel_out.lights[3].yellow_cross;
  assign yellow_4 = sel_out.lights[3].yellow;
  assign red_cross_4 = sel_out.lights[3].red_cross;
  assign red_4 = sel_out.lights[3].red;
  assign walk_4 = sel_out.lights[3].walk;
  assign count_green_4 = sel_out.count_green[3];
  assign count_red_4 = sel_out.count_red[3];

endmodule
