// Clock distributor: per-road green timing under rush hour or manual control.
//
// The distributor keeps one clock code per road (see tlc_pkg) and hands the
// clock divider and the junction controllers the code of the road that is
// currently not red (the red lights of the output come back in as red[3:0]).
// When no road is non-red, or timing variation is off, the nominal code
// {mux_2x1_ip, clk_div_sel_ip} passes through unchanged.
//
// Timing variation is on when variable_time_enable or rush_mod_enable is
// high. The code written comes from Timing(1:0) (00 15 s, 01 45 s, 10 60 s,
// 11 90 s); the roads written depend on No_of_Roads_Time_Var:
//   00 one road  : road (road_timing_combination[1:0] + 1) gets Timing,
//                  all others return to the nominal code.
//   01 two roads : the pair named by road_timing_combination (000 1&2,
//                  001 1&3, 010 1&4, 011 3&2, 100 3&4, 101 4&2) gets Timing
//                  (tworoad_timing_same_diff = 0) or its first road gets
//                  Timing and its second the nominal code (= 1); the
//                  other roads return to the nominal code.
//   10 four roads, each its own: road (road_timing_combination[1:0] + 1)
//                  gets Timing, the others keep what they were last given,
//                  so the roads are set one after another.
//   11 four roads, same: every road gets the nominal code.
// The road selection for modes 00/10 and the meaning of "different" for two
// roads are this design's reading; the pair table and the Timing table are
// the document's. The per-road codes are registered (one clock of latency)
// and return to the nominal code while variation is off. clr is an
// asynchronous active-high reset.
module clk_distributor
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       variable_time_enable,
  input  logic       rush_mod_enable,
  input  logic [1:0] no_of_roads_time_var,
  input  logic       tworoad_timing_same_diff,
  input  logic [2:0] road_timing_combination,
  input  logic [1:0] timing,
  input  logic       mux_2x1_ip,
  input  logic [1:0] clk_div_sel_ip,
  input  logic [NROADS-1:0] red,
  output logic       mux_2x1,
  output logic [1:0] clk_div_sel
);
  clk_code_t nominal, tcode, out_code;
  clk_code_t road_code [NROADS];
  logic      vary;
  logic [1:0] pair_a, pair_b;
  logic       pair_ok;

  assign nominal = '{mux_2x1: mux_2x1_ip, div_sel: clk_div_sel_ip};
  assign tcode   = timing_code(timing);
  assign vary    = variable_time_enable || rush_mod_enable;

  always_comb begin
    pair_ok = 1'b1;
    unique case (road_timing_combination)
      3'd0:    begin pair_a = 2'd0; pair_b = 2'd1; end
      3'd1:    begin pair_a = 2'd0; pair_b = 2'd2; end
      3'd2:    begin pair_a = 2'd0; pair_b = 2'd3; end
      3'd3:    begin pair_a = 2'd2; pair_b = 2'd1; end
      3'd4:    begin pair_a = 2'd2; pair_b = 2'd3; end
      3'd5:    begin pair_a = 2'd3; pair_b = 2'd1; end
      default: begin pair_a = 2'd0; pair_b = 2'd0; pair_ok = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      for (int r = 0; r < NROADS; r++) road_code[r] <= '{mux_2x1: 1'b1, div_sel: 2'd0};
    end else if (!vary) begin
      for (int r = 0; r < NROADS; r++) road_code[r] <= nominal;
    end else begin
      unique case (no_of_roads_time_var)
        2'b00: for (int r = 0; r < NROADS; r++)
                 road_code[r] <= (road_timing_combination == 3'(r)) ? tcode : nominal;
        2'b01: for (int r = 0; r < NROADS; r++)
                 if (pair_ok && r == int'(pair_a))      road_code[r] <= tcode;
                 else if (pair_ok && r == int'(pair_b)) road_code[r] <= tworoad_timing_same_diff ? nominal : tcode;
                 else                                   road_code[r] <= nominal;
        2'b10: for (int r = 0; r < NROADS; r++)
                 if (road_timing_combination == 3'(r)) road_code[r] <= tcode;
        default: for (int r = 0; r < NROADS; r++) road_code[r] <= nominal;
      endcase
    end
  end

  always_comb begin
    out_code = nominal;
    if (vary) begin
      for (int r = NROADS - 1; r >= 0; r--)
        if (!red[r]) out_code = road_code[r];
    end
  end

  // Registered output: breaks the path from the red lights back to the
  // green timing of the junction controllers.
  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      mux_2x1     <= 1'b1;
      clk_div_sel <= 2'd0;
    end else begin
      mux_2x1     <= out_code.mux_2x1;
      clk_div_sel <= out_code.div_sel;
    end
  end

endmodule
