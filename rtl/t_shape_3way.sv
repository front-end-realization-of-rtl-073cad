// T-shape three-way junction: a main road (roads 1 and 2) and a side road 3.
//
// Phase A: roads 1 and 2 (both directions of the main road) have straight
// green for 30*P s (60 s at the default clock) and then 4 s of yellow.
// Phase B: road 1 has its turning (cross) green into road 3 for 15*P s
// (30 s) and 2 s of yellow. Phase C: road 3 has green for 15*P s and 2 s of
// yellow. The cycle is 64 + 32 + 32 s at the default. Only road 1 has cross
// lights; road 4 stays dark. The 60 + 4 s and 30 + 2 s timings and phases A
// and B are the document's; phase C (the side road's own green) is read
// from the 96/64/32 s down-count values the document shows for this
// junction.
// Inputs: timer_clk is the 1 Hz enable; mux_2x1_ip/clk_div_sel_ip is the
// clock code in force now (from the clock distributor) and sets the green
// time of the running phase; mux_2x1_nom/clk_div_sel_nom is the nominal
// code, used to predict later phases for the down-count displays.
// Timing: all outputs change on the clock edge after a 1 Hz tick.
module t_shape_3way
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       timer_clk,
  input  logic       ic_power_on_off,
  input  logic       emrgncy,
  input  logic       walk_enable,
  input  logic       enable_night_mod,
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

  localparam logic [NROADS-1:0] cross_installed = 4'b0001;

  always_comb begin
    phases   = '0;
    n_phases = 3'd3;
    phases[0].straight  = 4'b0011;
    phases[0].green_cur = scaled_s(code_cur, MAIN_GREEN_M);
    phases[0].green_nom = scaled_s(code_nom, MAIN_GREEN_M);
    phases[0].yellow    = MAIN_YELLOW_S;
    phases[1].turn     = 4'b0001;
    phases[1].green_cur = scaled_s(code_cur, BASIC_GREEN_M);
    phases[1].green_nom = scaled_s(code_nom, BASIC_GREEN_M);
    phases[1].yellow    = YELLOW_S;
    phases[2].straight  = 4'b0100;
    phases[2].green_cur = scaled_s(code_cur, BASIC_GREEN_M);
    phases[2].green_nom = scaled_s(code_nom, BASIC_GREEN_M);
    phases[2].yellow    = YELLOW_S;
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
    .roads_present   (4'b0111),
    .cross_installed (cross_installed),
    .out             (jout)
  );

endmodule
