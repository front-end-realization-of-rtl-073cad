// Phase engine: the light sequencer and down-count timer of one junction.
//
// This is the timer block inside each traffic block, run by the 1 Hz
// Timer_Clk enable; the four junction types share it.
// A junction cycle is a list of up to four phases (tlc_pkg::phase_t). In a
// phase the roads it names see green for green_cur seconds and then yellow
// for `yellow` seconds; all other installed lights are red. The engine
// steps once per `tick` (1 Hz). It drives:
//   * lights: straight lights for roads in `straight`, cross lights for
//     roads in `turn`; red / red_cross wherever the road is installed and
//     not moving; roads not present stay dark; cross lights exist only for
//     roads in cross_installed.
//   * walk: on with the straight green when walk_enable is high, blinking
//     1 s on / 1 s off over the last 4 s of the green.
//   * count_green: for a road that is moving, the seconds left in the phase
//     (green + yellow); otherwise the length of its next phase.
//   * count_red: while the road's straight red is lit, the seconds until its
//     straight green (rest of this phase plus the nominal length of the
//     phases in between); while its straight light is green or yellow, the
//     length of the red time ahead of it (sum of the nominal lengths of the
//     phases without its straight light).
// Night mode darkens everything except the straight yellow lights of the
// present roads, which blink 1 s on / 1 s off, and restarts the cycle at
// phase 0. Emergency freezes the sequence: every light holds its state.
// Power off (power_on = 0) darkens all outputs and restarts the cycle.
// clr is an asynchronous active-high reset. The document describes this
// behaviour per junction type; sharing one engine, restarting the cycle in
// night mode and the exact display rules are this design's choices.
module phase_engine
  import tlc_pkg::*;
(
  input  logic clk,
  input  logic clr,
  input  logic tick,
  input  logic power_on,
  input  logic emergency,
  input  logic night,
  input  logic walk_enable,
  input  logic [2:0] n_phases,
  input  phase_t [MAX_PHASES-1:0] phases,
  input  logic [NROADS-1:0] roads_present,
  input  logic [NROADS-1:0] cross_installed,
  output junction_out_t out
);
  logic [1:0]       ph;        // current phase
  logic             in_yellow; // phase is in its yellow part
  logic [SEC_W-1:0] elapsed;   // seconds spent in the green or yellow part
  logic             blink;     // night-mode blink phase

  phase_t cur;
  assign cur = phases[ph];
  logic [SEC_W-1:0] unused_nom;
  assign unused_nom = cur.green_nom; // only later phases' nominal times are read

  logic last_phase;
  assign last_phase = (3'(ph) + 3'd1 >= n_phases);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      ph        <= '0;
      in_yellow <= 1'b0;
      elapsed   <= '0;
      blink     <= 1'b0;
    end else if (!power_on || night) begin
      ph        <= '0;
      in_yellow <= 1'b0;
      elapsed   <= '0;
      if (!power_on)  blink <= 1'b0;
      else if (tick)  blink <= ~blink;
    end else begin
      blink <= 1'b0;
      if (tick && !emergency) begin
        if (!in_yellow) begin
          if (elapsed + 1'b1 >= cur.green_cur) begin
            in_yellow <= 1'b1;
            elapsed   <= '0;
          end else begin
            elapsed <= elapsed + 1'b1;
          end
        end else if (elapsed + 1'b1 >= SEC_W'(cur.yellow)) begin
          in_yellow <= 1'b0;
          elapsed   <= '0;
          ph        <= last_phase ? 2'd0 : ph + 2'd1;
        end else begin
          elapsed <= elapsed + 1'b1;
        end
      end
    end
  end

  // Seconds left of the green part and of the whole phase.
  logic [SEC_W-1:0] green_left, phase_left;
  always_comb begin
    green_left = (cur.green_cur > elapsed) ? cur.green_cur - elapsed : '0;
    if (in_yellow)
      phase_left = (SEC_W'(cur.yellow) > elapsed) ? SEC_W'(cur.yellow) - elapsed : '0;
    else
      phase_left = green_left + SEC_W'(cur.yellow);
  end

  logic walk_on;
  assign walk_on = walk_enable && !in_yellow &&
                   (green_left > SEC_W'(WALK_BLINK_S) || !green_left[0]);

  always_comb begin
    out = '0;
    for (int k = 0; k < NROADS; k++) begin
      logic moving, seen_any, seen_str;
      logic [2:0] idx;
      logic [RCNT_W-1:0] wait_s, red_s;
      logic [GCNT_W-1:0] next_len;

      moving   = cur.straight[k] || cur.turn[k];
      seen_any = 1'b0;
      seen_str = 1'b0;
      wait_s   = RCNT_W'(phase_left);
      red_s    = '0;
      next_len = '0;
      idx      = '0;
      for (int j = 1; j <= MAX_PHASES; j++) begin
        if (j <= int'(n_phases)) begin
          idx = 3'(ph) + 3'(j);
          if (idx >= n_phases) idx = idx - n_phases;
          if (!seen_any && (phases[idx].straight[k] || phases[idx].turn[k]))
            next_len = GCNT_W'(phases[idx].green_nom + SEC_W'(phases[idx].yellow));
          seen_any = seen_any || phases[idx].straight[k] || phases[idx].turn[k];
          if (!phases[idx].straight[k])
            red_s = red_s + RCNT_W'(phases[idx].green_nom) + RCNT_W'(phases[idx].yellow);
          if (phases[idx].straight[k])
            seen_str = 1'b1;
          else if (!seen_str)
            wait_s = wait_s + RCNT_W'(phases[idx].green_nom) + RCNT_W'(phases[idx].yellow);
        end
      end

      if (power_on && roads_present[k]) begin
        if (night) begin
          out.lights[k].yellow = ~blink;
        end else begin
          out.lights[k].green        = cur.straight[k] && !in_yellow;
          out.lights[k].yellow       = cur.straight[k] &&  in_yellow;
          out.lights[k].red          = !cur.straight[k];
          out.lights[k].walk         = cur.straight[k] && walk_on;
          out.lights[k].green_cross  = cross_installed[k] && cur.turn[k] && !in_yellow;
          out.lights[k].yellow_cross = cross_installed[k] && cur.turn[k] &&  in_yellow;
          out.lights[k].red_cross    = cross_installed[k] && !cur.turn[k];
          out.count_green[k] = moving ? GCNT_W'(phase_left) : next_len;
          out.count_red[k]   = cur.straight[k] ? red_s : wait_s;
        end
      end
    end
  end

  // Safety rules: a road never lights two of its green, yellow and red at
  // once, on either its straight or its cross signal head.
  for (genvar k = 0; k < NROADS; k++) begin : g_safety
    a_straight_head: assert property (@(posedge clk)
      $onehot0({out.lights[k].green, out.lights[k].yellow, out.lights[k].red}));
    a_cross_head: assert property (@(posedge clk)
      $onehot0({out.lights[k].green_cross, out.lights[k].yellow_cross, out.lights[k].red_cross}));
  end

endmodule
