// Y-shape three-way junction: three roads get green in turn.
//
// The same control as the basic four-way junction on three roads: road k
// (1..3) has green for 15*P s (30 s at the default clock) and then yellow
// for 2 s while the others are red, a 3 x 32 s cycle at the default. Road 4
// outputs stay dark. No cross lights are installed. The 30 + 2 s timing is
// the document's; the scaling with the clock code is this design's reading.
// Inputs: timer_clk is the 1 Hz enable; mux_2x1_ip/clk_div_sel_ip is the
// clock code in force now (from the clock distributor) and sets the green
// time of the running phase; mux_2x1_nom/clk_div_sel_nom is the nominal
// code, used to predict later phases for the down-count displays.
// Timing: all outputs change on the clock edge after a 1 Hz tick.
module y_shape_3way
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
    n_phases = 3'd3;
    for (int p = 0; p < 3; p++) begin
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
    .roads_present   (4'b0111),
    .cross_installed (cross_installed),
    .out             (jout)
  );

endmodule
