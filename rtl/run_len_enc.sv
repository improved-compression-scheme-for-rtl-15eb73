// run_len_enc: window flag encoder, the encoder whose output the document
// shows in simulation.
//
// The DATA_W-bit word is cut into DATA_W/K windows of K bits (window i is
// data[K*i+K-1 : K*i]). eq_0[i] is set when window i is all zeros, eq_1[i]
// when it is all ones; data_e is the word with every all-ones window
// cleared, so every uniform window holds zeros and is described by its
// flag alone. Outputs are registered on the rising clock edge, rst (active
// high) clears them. With the defaults, data 123FFF605000FFFF gives data_e
// 1230006050000000, eq_0 0170 and eq_1 1C0F (hexadecimal), the values
// in the document's waveform. Port names and widths follow that waveform;
// the register stage and reset polarity are this design's choices.
module run_len_enc #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned K      = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   data,
  output logic [DATA_W-1:0]   data_e,
  output logic [DATA_W/K-1:0] eq_0,
  output logic [DATA_W/K-1:0] eq_1
);
  localparam int unsigned NW = DATA_W / K;

  logic [NW-1:0]     z, o;
  logic [DATA_W-1:0] cleared;

  for (genvar i = 0; i < NW; i++) begin : g_win
    assign z[i] = (data[K*i +: K] == '0);
    assign o[i] = (data[K*i +: K] == '1);
    assign cleared[K*i +: K] = o[i] ? '0 : data[K*i +: K];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_e <= '0;
      eq_0   <= '0;
      eq_1   <= '0;
    end else begin
      data_e <= cleared;
      eq_0   <= z;
      eq_1   <= o;
    end
  end
endmodule
