// bit_unpacker: input-end shifting network of the PRLE decoder.
//
// The decoder runs the encoder's data path backwards: stored 16-bit words
// come in and a window of the next WIN_W stream bits goes out. Words are
// appended behind the held bits by a barrel shifter, and bits used by the
// decoder are removed from the front by a second barrel shifter. A word is
// taken (word_valid and word_ready) whenever at most BUF_W - WW bits are
// held. avail counts valid bits; window bits beyond avail are zero.
// consume (0..WIN_W, not more than avail) takes effect at the next edge.
// The mirrored use of the shifting networks follows the document; sizes
// and handshake are this design's choices.
module bit_unpacker
  import prle_pkg::*;
#(
  parameter int unsigned WW    = WORD_W,
  parameter int unsigned WIN_W = 24,
  parameter int unsigned BUF_W = 48
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       word_valid,
  input  logic [WW-1:0]              word_in,
  output logic                       word_ready,
  output logic [WIN_W-1:0]           win,
  output logic [$clog2(BUF_W+1)-1:0] avail,
  input  logic [$clog2(WIN_W+1)-1:0] consume
);
  localparam int unsigned FW = $clog2(BUF_W + 1);
  localparam int unsigned SH = $clog2(BUF_W);

  logic [BUF_W-1:0] buf_q;     // held bits, left aligned
  logic [FW-1:0]    cnt_q;
  logic [BUF_W-1:0] after_use, word_placed;
  logic [FW-1:0]    cnt1;

  barrel_shifter #(.W(BUF_W)) u_drop (
    .din(buf_q), .shamt(SH'(consume)), .dout(after_use)
  );
  barrel_shifter #(.W(BUF_W)) u_place (
    .din  ({{(BUF_W-WW){1'b0}}, word_in}),
    .shamt(SH'(BUF_W - WW) - SH'(cnt1)),
    .dout (word_placed)
  );

  assign win        = buf_q[BUF_W-1 -: WIN_W];
  assign avail      = cnt_q;
  assign word_ready = (cnt_q <= FW'(BUF_W - WW));
  assign cnt1       = cnt_q - FW'(consume);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (word_valid && word_ready) begin
      buf_q <= after_use | word_placed;
      cnt_q <= cnt1 + FW'(WW);
    end else begin
      buf_q <= after_use;
      cnt_q <= cnt1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) FW'(consume) <= cnt_q);
endmodule
