// Self-checking testbench of clk_distributor.
//
// Holds the inputs for three clocks, then checks the output clock code
// against a table worked out here: with variation off the nominal code
// passes; with it on (Variable_Time_Enable or rush mode) the code of the
// road whose red is off is the Timing code if that road was chosen, for
// each No_of_Roads_Time_Var mode, each of the six road pairs and both
// same/different settings. Also checks all-red (nominal) and the
// road-by-road setting of mode 10, which keeps earlier settings.
module tb_clk_distributor;
  logic       clk = 1'b0;
  logic       clr = 1'b1;
  logic       vte = 1'b0, rush = 1'b0;
  logic [1:0] nroads = 2'd0;
  logic       diff = 1'b0;
  logic [2:0] comb = 3'd0;
  logic [1:0] timing = 2'd0;
  logic       mux_ip = 1'b1;
  logic [1:0] sel_ip = 2'd0;
  logic [3:0] red = 4'hF;
  logic       mux_o;
  logic [1:0] sel_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_distributor dut (
    .clk (clk), .clr (clr),
    .variable_time_enable (vte), .rush_mod_enable (rush),
    .no_of_roads_time_var (nroads), .tworoad_timing_same_diff (diff),
    .road_timing_combination (comb), .timing (timing),
    .mux_2x1_ip (mux_ip), .clk_div_sel_ip (sel_ip),
    .red (red), .mux_2x1 (mux_o), .clk_div_sel (sel_o)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pairs named by Road_Timing_Combination, roads numbered 1..4.
  int pair_first  [6] = '{1, 1, 1, 3, 3, 4};
  int pair_second [6] = '{2, 3, 4, 2, 4, 2};

  function automatic logic [2:0] tcode(logic [1:0] t);
    return (t == 2'd0) ? 3'b000 : {1'b1, t};
  endfunction

  task automatic settle();
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_code(logic [2:0] exp, string what);
    checks++;
    if ({mux_o, sel_o} != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, {mux_o, sel_o}, exp);
    end
  endtask

  // Make only road r (1..4) non-red.
  task automatic go(int r);
    red = 4'hF;
    red[r-1] = 1'b0;
  endtask

  initial begin
    logic [2:0] nom;
    repeat (2) @(negedge clk);
    clr = 1'b0;
    mux_ip = 1'b1; sel_ip = 2'd2;   // nominal: 60 s
    nom = 3'b110;

    // Variation off: nominal whatever the lights and the Timing input.
    timing = 2'd3;
    for (int r = 1; r <= 4; r++) begin
      go(r); settle();
      expect_code(nom, "variation off");
    end

    // Mode 00: one road.
    vte = 1'b1; nroads = 2'b00;
    for (int c = 0; c < 4; c++) begin
      comb = 3'(c); timing = 2'(c);
      for (int r = 1; r <= 4; r++) begin
        go(r); settle();
        expect_code((r == c + 1) ? tcode(timing) : nom, $sformatf("one road, road %0d of %0d", c + 1, r));
      end
    end

    // Mode 01: two roads, same and different timing, every pair.
    nroads = 2'b01;
    for (int dd = 0; dd < 2; dd++) begin
      diff = dd[0];
      for (int c = 0; c < 6; c++) begin
        comb = 3'(c); timing = 2'd0;
        for (int r = 1; r <= 4; r++) begin
          logic [2:0] e;
          if (r == pair_first[c]) e = tcode(timing);
          else if (r == pair_second[c]) e = diff ? nom : tcode(timing);
          else e = nom;
          go(r); settle();
          expect_code(e, $sformatf("two roads diff=%0d pair %0d road %0d", dd, c, r));
        end
      end
    end

    // Mode 10: set roads one by one; earlier settings stay.
    nroads = 2'b10;
    red = 4'hF;
    for (int c = 0; c < 4; c++) begin
      comb = 3'(c); timing = 2'(3 - c);
      settle();
    end
    comb = 3'd7;   // select no road: nothing written
    for (int r = 1; r <= 4; r++) begin
      go(r); settle();
      expect_code(tcode(2'(3 - (r - 1))), $sformatf("four roads individually, road %0d", r));
    end

    // Mode 11: all roads the nominal code.
    nroads = 2'b11; timing = 2'd3;
    for (int r = 1; r <= 4; r++) begin
      go(r); settle();
      expect_code(nom, "four roads same");
    end

    // Rush mode alone enables variation; all-red gives the nominal code;
    // two roads non-red: the lower-numbered road counts.
    vte = 1'b0; rush = 1'b1; nroads = 2'b00; comb = 3'd2; timing = 2'd1;
    go(3); settle();
    expect_code(tcode(2'd1), "rush mode enables");
    red = 4'hF; settle();
    expect_code(nom, "all red");
    red = 4'b0011; settle();
    expect_code(tcode(2'd1), "roads 3 and 4 non-red");
    rush = 1'b0; settle();
    expect_code(nom, "rush ends");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
