// Shared types and constants of the traffic light controller.
//
// The whole chip runs from one 4 Hz clock. Slower timing is done with
// one-cycle clock enables ("ticks") instead of derived clocks. A green time
// is chosen by a 3-bit clock code {mux_2x1, div_sel}: the same code that
// selects the main clock of the clock divider. A code stands for a clock
// period factor P of 1, 2, 3, 4 or 6 (15, 30, 45, 60 or 90 s of basic green
// time, i.e. green = 15*P seconds). The junction timings are all multiples
// of P: basic/Y green 15P, class-2 cross green 5P and straight green 9P,
// T-shape main-road green 30P. Yellow lasts 2 s (4 s on the T-shape main
// road). These numbers reproduce the document's 30/10/18/60 s examples at
// the default code P = 2.
package tlc_pkg;

  localparam int NROADS     = 4;
  localparam int MAX_PHASES = 4;
  localparam int GCNT_W     = 8;   // green down-count display width
  localparam int RCNT_W     = 9;   // red down-count display width
  localparam int SEC_W      = 8;   // width of a phase time in seconds
  localparam int WALK_BLINK_S = 4; // walk light blinks in the last 4 s of green

  // Yellow times in seconds.
  localparam logic [2:0] YELLOW_S        = 3'd2;
  localparam logic [2:0] MAIN_YELLOW_S   = 3'd4;  // T-shape main road

  // Green times as multiples of the clock period factor P (see above).
  localparam logic [SEC_W-1:0] BASIC_GREEN_M    = 8'd15; // basic and Y: 30 s at P = 2
  localparam logic [SEC_W-1:0] CROSS_GREEN_M    = 8'd5;  // class-2 cross: 10 s
  localparam logic [SEC_W-1:0] STRAIGHT_GREEN_M = 8'd9;  // class-2 straight: 18 s
  localparam logic [SEC_W-1:0] MAIN_GREEN_M     = 8'd30; // T-shape main road: 60 s

  typedef enum logic [1:0] {
    TS_BASIC4 = 2'b00,
    TS_CLASS2 = 2'b01,
    TS_YSHAPE = 2'b10,
    TS_TSHAPE = 2'b11
  } traffic_sel_e;

  // Clock selection code: 2:1 mux select and 4:1 mux select of the divider.
  typedef struct packed {
    logic       mux_2x1;
    logic [1:0] div_sel;
  } clk_code_t;

  // The seven lights of one road.
  typedef struct packed {
    logic green;
    logic green_cross;
    logic yellow;
    logic yellow_cross;
    logic red;
    logic red_cross;
    logic walk;
  } road_lights_t;

  // Everything a junction controller drives: lights and displays of 4 roads.
  typedef struct packed {
    road_lights_t [NROADS-1:0]             lights;
    logic         [NROADS-1:0][GCNT_W-1:0] count_green;
    logic         [NROADS-1:0][RCNT_W-1:0] count_red;
  } junction_out_t;

  // One phase of a junction cycle. Roads in `straight` get the straight
  // lights, roads in `turn` the cross (turning) lights. green_cur is the
  // green time under the timing in force now, green_nom under the nominal
  // (user-selected) timing; the second is used to predict future phases.
  typedef struct packed {
    logic [NROADS-1:0] straight;
    logic [NROADS-1:0] turn; 
    logic [SEC_W-1:0]  green_cur;
    logic [SEC_W-1:0]  green_nom;
    logic [2:0]        yellow;
  } phase_t;

  // Clock period factor P of a clock code (divide ratio against the 4 Hz
  // clock): 2:1 mux gives /1 or /2, 4:1 mux inputs are that, /3, /4 and /6.
  function automatic logic [2:0] period_factor(clk_code_t c);
    return (c.div_sel == 2'd0) ? (c.mux_2x1 ? 3'd2 : 3'd1) :
           (c.div_sel == 2'd1) ? 3'd3 :
           (c.div_sel == 2'd2) ? 3'd4 : 3'd6;
  endfunction

  // Green time for a multiple m of P.
  function automatic logic [SEC_W-1:0] scaled_s(clk_code_t c, logic [SEC_W-1:0] m);
    return m * SEC_W'(period_factor(c));
  endfunction

  // Code of the Timing(1:0) input: 00 15 s, 01 45 s, 10 60 s, 11 90 s.
  function automatic clk_code_t timing_code(logic [1:0] t);
    clk_code_t c;
    c.mux_2x1 = (t != 2'd0);
    c.div_sel = t;
    return c;
  endfunction

endpackage
