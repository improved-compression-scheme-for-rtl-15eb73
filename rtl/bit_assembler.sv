// bit_assembler: output-end shifting network of the PRLE decoder.
//
// Rebuilds the n-bit word for the volatile registers: each accepted group
// of cnt bits (1..KW, left aligned in bits) is shifted in at the LSB end
// while the word moves up by cnt places through a barrel shifter, so the
// first decoded bit ends at the MSB. clear empties the word. One group per
// cycle, result visible on dout one cycle after the last group.
// Mirrors the encoder's input-end network as the document describes; the
// single-stage form is this design's choice.
module bit_assembler
  import prle_pkg::*;
#(
  parameter int unsigned N_BITS = DATA_W,
  parameter int unsigned KW     = KMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    valid,
  input  logic [KW-1:0]           bits,
  input  logic [$clog2(KW+1)-1:0] cnt,
  output logic [N_BITS-1:0]       dout
);
  localparam int unsigned SH = $clog2(N_BITS);

  logic [N_BITS-1:0] moved;
  logic [KW-1:0]     low;

  barrel_shifter #(.W(N_BITS)) u_shift (
    .din(dout), .shamt(SH'(cnt)), .dout(moved)
  );
  assign low = bits >> (KW - int'(cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dout <= '0;
    else if (clear)  dout <= '0;
    else if (valid)  dout <= moved | N_BITS'(low);
  end
endmodule
