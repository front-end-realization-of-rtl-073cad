// Self-checking testbench of output_mux_bank.
//
// Applies random junction outputs on all four inputs and checks, for every
// Traffic_Sel value, that each light and display comes from the selected
// junction, bit for bit and field by field.
module tb_output_mux_bank;
  import tlc_pkg::*;

  logic [1:0]    sel;
  junction_out_t jin [4];
  junction_out_t jout;
  int checks = 0, failures = 0;

  output_mux_bank dut (.traffic_sel (sel), .jin (jin), .jout (jout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int j = 0; j < 4; j++)
        for (int w = 0; w < $bits(junction_out_t); w += 32)
          jin[j][w +: 32] = $urandom;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        for (int k = 0; k < NROADS; k++) begin
          checks++;
          if (jout.lights[k] != jin[s].lights[k] ||
              jout.count_green[k] != jin[s].count_green[k] ||
              jout.count_red[k] != jin[s].count_red[k]) begin
            failures++;
            if (failures < 10) $display("FAIL sel %0d road %0d", s, k + 1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
