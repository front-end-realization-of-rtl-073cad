// Self-checking testbench of phase_engine, the shared junction sequencer.
//
// Loads a made-up three-phase table that no junction uses: odd green and
// yellow times, a phase with both straight and turning roads, a dark road
// and cross lights on one road only. It compares lights and displays every
// second with the tb_ref_pkg model over three cycles, then checks the
// emergency freeze, night blinking and restart, power off and the 1 Hz
// step rate (outputs change only on the clock after a step).
module tb_phase_engine;
  import tlc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, clr = 1'b1, tick = 1'b0;
  logic pwr = 1'b1, emg = 1'b0, night = 1'b0, walk = 1'b1;
  phase_t [MAX_PHASES-1:0] phases;
  junction_out_t jout;
  jdesc_t d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_engine dut (
    .clk (clk), .clr (clr), .tick (tick), .power_on (pwr), .emergency (emg),
    .night (night), .walk_enable (walk), .n_phases (3'(d.n)), .phases (phases),
    .roads_present (4'b0111), .cross_installed (4'b0100), .out (jout)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out_eq(junction_out_t exp, string what);
    checks++;
    if (jout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, jout, exp);
    end
  endtask

  task automatic one_second();
    repeat (3) @(negedge clk);
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
  endtask

  task automatic follow(int t0, int nsec, string what);
    int ph, s;
    for (int t = t0; t < t0 + nsec; t++) begin
      locate(d, t, ph, s);
      expect_out_eq(expect_out(d, d, ph, s, walk), what);
      one_second();
    end
  endtask

  initial begin
    junction_out_t snap;
    // Phase 0: road 1 straight and road 3 turning, 7 + 3 s.
    // Phase 1: roads 2 and 3 straight, 9 + 1 s.  Phase 2: road 1, 4 + 2 s.
    d.n = 3; d.present = 'h7; d.cross_inst = 'h4;
    d.str = '{'b0001, 'b0110, 'b0001, 0};
    d.trn = '{'b0100, 0, 0, 0};
    d.grn = '{7, 9, 4, 0};
    d.yel = '{3, 1, 2, 0};
    phases = '0;
    for (int p = 0; p < 3; p++) begin
      phases[p].straight  = 4'(d.str[p]);
      phases[p].turn      = 4'(d.trn[p]);
      phases[p].green_cur = 8'(d.grn[p]);
      phases[p].green_nom = 8'(d.grn[p]);
      phases[p].yellow    = 3'(d.yel[p]);
    end
    repeat (3) @(negedge clk);
    clr = 1'b0;
    @(negedge clk);

    follow(0, 3 * cycle_len(d), "custom table");

    // Outputs move only with the 1 Hz step.
    snap = jout;
    repeat (7) @(negedge clk);
    expect_out_eq(snap, "no change without a step");

    // Emergency freeze.
    emg = 1'b1;
    for (int i = 0; i < 4; i++) begin one_second(); expect_out_eq(snap, "emergency freeze"); end
    emg = 1'b0;
    follow(0, 5, "after emergency");

    // Night: yellow on roads 1..3 blinking; then restart.
    night = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      expect_out_eq(night_out(d, (i % 2) == 0), "night blink");
      one_second();
    end
    night = 1'b0;
    @(negedge clk);
    follow(0, cycle_len(d), "after night");

    // Power off.
    pwr = 1'b0;
    @(negedge clk);
    expect_out_eq('0, "power off");
    one_second();
    expect_out_eq('0, "power off stays dark");
    pwr = 1'b1;
    @(negedge clk);
    walk = 1'b0;
    @(negedge clk);
    follow(0, cycle_len(d), "walk disabled after power on");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
