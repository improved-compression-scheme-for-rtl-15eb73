// rle_dec: window flag decoder, the counterpart of run_len_enc shown in
// the document's decoding waveform.
//
// Every K-bit window i of data_e is rebuilt: all ones when eq1[i] is set,
// all zeros when eq0[i] is set, otherwise copied unchanged. data_d is
// registered on the rising clock edge. With the defaults, data_e
// 1230006050000000, eq1 1C0F and eq0 0170 give data_d 123FFF605000FFFF.
// Port names and widths follow the waveform; the register stage, the lack
// of a reset (none is shown) and the priority of eq1 over eq0 are this
// design's choices.
module rle_dec #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned K      = 4
) (
  input  logic                clk,
  input  logic [DATA_W-1:0]   data_e,
  input  logic [DATA_W/K-1:0] eq1,
  input  logic [DATA_W/K-1:0] eq0,
  output logic [DATA_W-1:0]   data_d
);
  localparam int unsigned NW = DATA_W / K;

  logic [DATA_W-1:0] rebuilt;

  for (genvar i = 0; i < NW; i++) begin : g_win
    assign rebuilt[K*i +: K] = eq1[i] ? '1 : (eq0[i] ? '0 : data_e[K*i +: K]);
  end

  always_ff @(posedge clk) data_d <= rebuilt;
endmodule
