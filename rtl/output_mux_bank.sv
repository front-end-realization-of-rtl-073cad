// Output multiplexer bank: selects which junction controller drives the pins.
//
// All four junction controllers run side by side; Traffic_Sel(1:0) picks
// one (00 basic four-way, 01 class-2 four-way, 10 Y-shape, 11 T-shape).
// As in the document the bank is built from 36 4:1 multiplexers sharing the
// select: four 8-bit ones for the green down-counts, four 9-bit ones for
// the red down-counts and 28 1-bit ones for the seven lights (green, green
// cross, yellow, yellow cross, red, red cross, walk) of each of four roads.
// Purely combinational.
module output_mux_bank
  import tlc_pkg::*;
(
  input  logic [1:0]    traffic_sel,
  input  junction_out_t jin [4],
  output junction_out_t jout
);
  for (genvar k = 0; k < NROADS; k++) begin : g_road
    mux4 #(.W(GCNT_W)) u_cnt_green (
      .sel (traffic_sel),
      .in  ({jin[3].count_green[k], jin[2].count_green[k], jin[1].count_green[k], jin[0].count_green[k]}),
      .y   (jout.count_green[k])
    );
    mux4 #(.W(RCNT_W)) u_cnt_red (
      .sel (traffic_sel),
      .in  ({jin[3].count_red[k], jin[2].count_red[k], jin[1].count_red[k], jin[0].count_red[k]}),
      .y   (jout.count_red[k])
    );
    for (genvar b = 0; b < $bits(road_lights_t); b++) begin : g_light
      mux4 #(.W(1)) u_light (
        .sel (traffic_sel),
        .in  ({jin[3].lights[k][b], jin[2].lights[k][b], jin[1].lights[k][b], jin[0].lights[k][b]}),
        .y   (jout.lights[k][b])
      );
    end
  end
endmodule
