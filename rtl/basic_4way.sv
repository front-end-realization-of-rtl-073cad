// Basic four-way junction: the four roads get green in turn, clockwise.
//
// Road k (1..4) has green for 15*P s (30 s at the default 30 s clock,
// P = 2) and then yellow for 2 s, while the other three roads show red; the
// full cycle is 4 x 32 s at the default. Walk lights follow the green of
// their road and blink during its last 4 s. No cross lights are installed.
// The order, the 30 + 2 s timing and the walk rule follow the document; the
// scaling of the green time with the clock code is this design's reading of
// how the selected clock sets the green time. The sequencing, displays,
// night, emergency and power behaviour are in phase_engine.
// Inputs: timer_clk is the 1 Hz enable; mux_2x1_ip/clk_div_sel_ip is the
// clock code in force now (from the clock distributor) and sets the green
// time of the running phase; mux_2x1_nom/clk_div_sel_nom is the nominal
// code, used to predict later phases for the down-count displays.
// Timing: all outputs change on the clock edge after a 1 Hz tick.
module basic_4way
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

  localparam logic [NROADS-1:0] cross_installed = 4'b0000;

  always_comb begin
    phases   = '0;
    n_phases = 3'd4;
    for (int p = 0; p < 4; p++) begin
      phases[p].straight  = 4'(1 << p);
      phases[p].green_cur = scaled_s(code_cur, BASIC_GREEN_M);
      phases[p].green_nom = scaled_s(code_nom, BASIC_GREEN_M);
      phases[p].yellow    = YELLOW_S;
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
