// Self-checking testbench of clk_divider.
//
// For each of the five clock selections (2:1 mux at /1 or /2, 4:1 mux at
// /1.5, /2 and /3 of the /2 stage) it measures the spacing of the main
// clock pulses in input clocks (expected 1, 2, 3, 4, 6) and the number of
// pulses in 120 clocks, and checks that the timer pulse comes every
// 4 clocks (1 Hz from the 4 Hz clock) whatever the selection.
module tb_clk_divider;
  logic       clk = 1'b0;
  logic       clr = 1'b1;
  logic       mux = 1'b0;
  logic [1:0] sel = 2'd0;
  logic       main_t, timer_t;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_divider dut (
    .clk            (clk),
    .clr            (clr),
    .mux_2x1_ip     (mux),
    .clk_div_sel_ip (sel),
    .clk_main_out   (main_t),
    .timer_clk      (timer_t)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Measure over 120 clocks: pulse count and spacing of main and timer pulses.
  task automatic measure(int period, string what);
    int n_main, n_timer, last_main, last_timer, bad_main, bad_timer;
    n_main = 0; n_timer = 0; last_main = -1; last_timer = -1; bad_main = 0; bad_timer = 0;
    for (int c = 0; c < 120; c++) begin
      @(negedge clk);
      if (main_t) begin
        if (last_main >= 0 && c - last_main != period) bad_main++;
        last_main = c;
        n_main++;
      end
      if (timer_t) begin
        if (last_timer >= 0 && c - last_timer != 4) bad_timer++;
        last_timer = c;
        n_timer++;
      end
    end
    expect_int(n_main, 120 / period, {what, ": main pulses in 120 clocks"});
    expect_int(bad_main, 0, {what, ": main pulse spacing"});
    expect_int(n_timer, 30, {what, ": timer pulses in 120 clocks"});
    expect_int(bad_timer, 0, {what, ": timer pulse spacing"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    clr = 1'b0;
    mux = 1'b0; sel = 2'd0; measure(1, "15 s clock (/1)");
    mux = 1'b1; sel = 2'd0; measure(2, "30 s clock (/2)");
    mux = 1'b1; sel = 2'd1; measure(3, "45 s clock (/1.5 of /2)");
    mux = 1'b0; sel = 2'd1; measure(3, "45 s clock, 2:1 mux ignored");
    mux = 1'b1; sel = 2'd2; measure(4, "60 s clock (/2 of /2)");
    mux = 1'b1; sel = 2'd3; measure(6, "90 s clock (/3 of /2)");
    // Reset holds the dividers.
    clr = 1'b1;
    @(negedge clk);
    expect_int(int'(timer_t), 0, "no timer pulse in reset");
    clr = 1'b0;
    measure(6, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
