// prle_decoder: parallel run-length (PRLE) decoder of one n-bit word.
//
// The encoder's data path run backwards: the input-end network
// (bit_unpacker) takes the stored 16-bit words and shows the next stream
// bits, the RLE decoding module turns segments back into bits, k per
// cycle, and the output-end network (bit_assembler) rebuilds the word.
//
// Interface: pulse start with k held steady; supply words on
// word_valid/word_ready in the order the encoder wrote them (supply zero
// words if the stream has ended early: they decode as a format error).
// done rises when all n bits are rebuilt or a format error stops the word;
// dout is valid from then on. Timing depends on the data: one cycle per
// header and one per group of at most k output bits.
module prle_decoder
  import prle_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [K_W-1:0]    cfg_k,
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  output logic              word_ready,
  output logic [DATA_W-1:0] dout,
  output logic              done,
  output logic              fmt_err
);
  localparam int unsigned WIN_W = 24;
  localparam int unsigned BUF_W = 48;

  logic [WIN_W-1:0]           win;
  logic [$clog2(BUF_W+1)-1:0] avail;
  logic [$clog2(WIN_W+1)-1:0] consume;
  logic                       out_valid;
  logic [KMAX-1:0]            out_bits;
  logic [K_W-1:0]             out_cnt;

  bit_unpacker #(.WW(WORD_W), .WIN_W(WIN_W), .BUF_W(BUF_W)) u_in (
    .clk, .rst_n, .clear(start),
    .word_valid, .word_in(word), .word_ready,
    .win, .avail, .consume
  );

  rle_decoder #(.WIN_W(WIN_W), .AV_W($clog2(BUF_W+1))) u_rle (
    .clk, .rst_n, .start, .cfg_k, .win, .avail, .consume,
    .out_valid, .out_bits, .out_cnt, .done, .fmt_err
  );

  bit_assembler #(.N_BITS(DATA_W), .KW(KMAX)) u_out (
    .clk, .rst_n, .clear(start),
    .valid(out_valid), .bits(out_bits), .cnt(out_cnt), .dout
  );
endmodule
