// 4:1 multiplexer of W-bit words: y = in[sel]. Purely combinational.
module mux4 #(
  parameter int W = 1
) (
  input  logic [1:0]        sel,
  input  logic [3:0][W-1:0] in,
  output logic [W-1:0]      y
);
  always_comb y = in[sel];
endmodule
