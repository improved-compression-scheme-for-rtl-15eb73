// barrel_shifter: logarithmic left shifter, the second stage of the
// two-stage hierarchical shifting network.
//
// The input is shifted towards the MSB by `shamt` places (zeros enter at
// the LSB) through $clog2(W) rows of 2:1 multiplexers, row j shifting by
// 2**j when shamt[j] is set. This is the multiplexer array drawn in the
// shifting-network figure; the document gives the structure, the row order
// is this design's choice. Purely combinational.
module barrel_shifter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]           din,
  input  logic [$clog2(W)-1:0]   shamt,
  output logic [W-1:0]           dout
);
  localparam int unsigned S = $clog2(W);

  logic [W-1:0] stage [S+1];

  assign stage[0] = din;
  for (genvar j = 0; j < S; j++) begin : g_row
    assign stage[j+1] = shamt[j] ? (stage[j] << (1 << j)) : stage[j];
  end
  assign dout = stage[S];
endmodule
