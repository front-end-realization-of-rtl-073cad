// Class-2 four-way junction: opposite roads move together, turning and
// straight traffic in separate phases.
//
// Normal mode (sub_mod_sel = 0): roads 1 and 3 get cross (turning) green
// for 5*P s (10 s at the default clock) and 2 s of cross yellow, then
// straight green for 9*P s (18 s) and 2 s of yellow; roads 2 and 4 then do
// the same. Special mode (sub_mod_sel = 1): only straight traffic, whose
// green lasts the whole cross + straight time of normal mode (14*P + 2 s,
// 30 s at the default) followed by 2 s of yellow; the cross lights stay red.
// Walk lights follow the straight green. The 10 + 2 s and 18 + 2 s timings,
// the pairing of roads 1/3 and 2/4 and the special mode are the document's;
// the scaling with the clock code is this design's reading.
// Inputs: timer_clk is the 1 Hz enable; mux_2x1_ip/clk_div_sel_ip is the
// clock code in force now (from the clock distributor) and sets the green
// time of the running phase; mux_2x1_nom/clk_div_sel_nom is the nominal
// code, used to predict later phases for the down-count displays.
// Timing: all outputs change on the clock edge after a 1 Hz tick.
module class2_4way
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       timer_clk,
  input  logic       ic_power_on_off,
  input  logic       emrgncy,
  input  logic       walk_enable,
  input  logic       enable_night_mod,
  input  logic       sub_mod_sel,
  input  logic       mux_2x1_ip,
  input  logic [1:0] clk_div_sel_ip,
  input  logic       mux_2x1_nom,
  input  logic [1:0] clk_div_sel_nom,
  output junction_out_t jout
);
  clk_code_t code_cur, code_nom;
  phase_t [MAX_PHASES-1:0] phases;
  logic [2:0] n_phases;

  assign code_cur = '{mux_2x1: mux_2x1_ip,  div_sel: clk_div_sel_ip};
  assign code_nom = '{mux_2x1: mux_2x1_nom, div_sel: clk_div_sel_nom};

  localparam logic [NROADS-1:0] cross_installed = 4'b1111;

  always_comb begin
    phases = '0;
    if (!sub_mod_sel) begin
      n_phases = 3'd4;
      for (int p = 0; p < 4; p++) begin
        if (p % 2 == 0) begin
          phases[p].turn     = (p < 2) ? 4'b0101 : 4'b1010;
          phases[p].green_cur = scaled_s(code_cur, CROSS_GREEN_M);
          phases[p].green_nom = scaled_s(code_nom, CROSS_GREEN_M);
        end else begin
          phases[p].straight  = (p < 2) ? 4'b0101 : 4'b1010;
          phases[p].green_cur = scaled_s(code_cur, STRAIGHT_GREEN_M);
          phases[p].green_nom = scaled_s(code_nom, STRAIGHT_GREEN_M);
        end
        phases[p].yellow = YELLOW_S;
      end
    end else begin
      n_phases = YELLOW_S;
      for (int p = 0; p < 2; p++) begin
        phases[p].straight  = (p == 0) ? 4'b0101 : 4'b1010;
        phases[p].green_cur = scaled_s(code_cur, CROSS_GREEN_M + STRAIGHT_GREEN_M) + SEC_W'(YELLOW_S);
        phases[p].green_nom = scaled_s(code_nom, CROSS_GREEN_M + STRAIGHT_GREEN_M) + SEC_W'(YELLOW_S);
        phases[p].yellow    = YELLOW_S;
      end
    end
  end

  phase_engine u_engine (
    .clk             (clk),
    .clr             (clr),
    .tick            (timer_clk),
    .power_on        (ic_power_on_off),
    .emergency       (emrgncy),
    .night           (enable_night_mod),
    .walk_enable     (walk_enable),
    .n_phases        (n_phases),
    .phases          (phases),
    .roads_present   (4'b1111),
    .cross_installed (cross_installed),
    .out             (jout)
  );

endmodule
