// Manually settable real time clock with night and rush hour windows.
//
// A seconds/minutes/hours counter (00:00:00 to 23:59:59) advances once per
// sec_tick (the 1 Hz timer enable). In manual mode (man_auto_mod_sel = 1)
// with time_set_enable = 1 the time is loaded from sec_in/min_in/hour_in on
// every clock and does not advance; otherwise the clock runs. Out-of-range
// set values (seconds or minutes above 59, hours above 23) load as 0.
//
// night_mod_enable is high while the hour lies in [night begin, night end);
// rush_mod_enable while it lies in the morning or the evening
// [begin, end) window. A window whose begin is later than its end wraps
// over midnight; begin equal to end means an empty window. Both flags are
// combinational from the registered time. The document gives the ports and
// the purpose; the window rule and the range handling are this design's.
// clr is an asynchronous active-high reset to 00:00:00.
module rtc (
  input  logic       clk,
  input  logic       clr,
  input  logic       sec_tick,
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
  output logic [5:0] sec,
  output logic [5:0] min,
  output logic [4:0] hour,
  output logic       night_mod_enable,
  output logic       rush_mod_enable
);
  function automatic logic in_window(logic [4:0] h, logic [4:0] b, logic [4:0] e);
    if (b < e)      return (h >= b) && (h < e);
    else if (b > e) return (h >= b) || (h < e);
    else            return 1'b0;
  endfunction

  logic setting;
  assign setting = man_auto_mod_sel && time_set_enable;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      sec  <= '0;
      min  <= '0;
      hour <= '0;
    end else if (setting) begin
      sec  <= (sec_in  <= 6'd59) ? sec_in  : '0;
      min  <= (min_in  <= 6'd59) ? min_in  : '0;
      hour <= (hour_in <= 5'd23) ? hour_in : '0;
    end else if (sec_tick) begin
      if (sec == 6'd59) begin
        sec <= '0;
        if (min == 6'd59) begin
          min  <= '0;
          hour <= (hour == 5'd23) ? 5'd0 : hour + 5'd1;
        end else begin
          min <= min + 6'd1;
        end
      end else begin
        sec <= sec + 6'd1;
      end
    end
  end

  assign night_mod_enable = in_window(hour, night_mod_begin_hour, night_mod_end_hour);
  assign rush_mod_enable  = in_window(hour, morning_rush_mod_begin_hour, morning_rush_mod_end_hour)
                         || in_window(hour, evening_rush_mod_begin_hour, evening_rush_mod_end_hour);

endmodule
