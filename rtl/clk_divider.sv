// Clock divider: the main clock and the 1 Hz timer clock of the chip.
//
// Follows the divider structure of the design: the input clock and a
// divide-by-2 stage (2_I) feed a 2:1 mux (Mux_2X1_IP, 15 s or 30 s clock);
// the divide-by-2 output feeds a divide-by-1.5, a second divide-by-2 (2_II)
// and a divide-by-3; a 4:1 mux (Clk_Div_Sel_IP) picks the 2:1 mux output,
// /1.5, /2_II or /3, giving the 15, 30, 45, 60 and 90 s clocks. Timer_Clk
// is the 2_II output, i.e. the input clock divided by 4 (1 Hz from 4 Hz).
//
// This implementation's own choice: every divided clock is a one-cycle
// enable pulse synchronous to clk rather than a generated clock, so the
// chip has a single clock domain. A pulse train at /1.5 of the /2 stage is
// one pulse every 3 input clocks. clr is an asynchronous active-high reset.
//
// Interface: clk_main_out pulses once per selected period (every cycle for
// the undivided selection); timer_clk pulses every 4th cycle.
module clk_divider (
  input  logic       clk,
  input  logic       clr,
  input  logic       mux_2x1_ip,
  input  logic [1:0] clk_div_sel_ip,
  output logic       clk_main_out,
  output logic       timer_clk
);
  logic       div2_q;       // divide-by-2 (2_I) phase
  logic [1:0] div15_cnt;    // divide-by-1.5 of the /2 stage: mod-3 count of clk
  logic       div2b_q;      // divide-by-2 (2_II) of the /2 stage
  logic [1:0] div3_cnt;     // divide-by-3 of the /2 stage

  logic div2_tick, div15_tick, div2b_tick, div3_tick, mux2_tick;

  assign div2_tick  = div2_q;
  assign div15_tick = (div15_cnt == 2'd2);
  assign div2b_tick = div2_tick && div2b_q;
  assign div3_tick  = div2_tick && (div3_cnt == 2'd2);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      div2_q    <= 1'b0;
      div15_cnt <= 2'd0;
      div2b_q   <= 1'b0;
      div3_cnt  <= 2'd0;
    end else begin
      div2_q    <= ~div2_q;
      div15_cnt <= (div15_cnt == 2'd2) ? 2'd0 : div15_cnt + 2'd1;
      if (div2_tick) begin
        div2b_q  <= ~div2b_q;
        div3_cnt <= (div3_cnt == 2'd2) ? 2'd0 : div3_cnt + 2'd1;
      end
    end
  end

  assign mux2_tick = mux_2x1_ip ? div2_tick : 1'b1;

  always_comb begin
    unique case (clk_div_sel_ip)
      2'd0:    clk_main_out = mux2_tick;
      2'd1:    clk_main_out = div15_tick;
      2'd2:    clk_main_out = div2b_tick;
      default: clk_main_out = div3_tick;
    endcase
  end

  assign timer_clk = div2b_tick;

endmodule
