// output_shift_network: the output-end shifting network of the PRLE encoder.
//
// Variable-length segments (up to SEG_W bits, left aligned) are appended
// behind the bits already held in a BUF_W-bit accumulator by a barrel
// shifter (fine stage). As soon as a full WORD_W-bit word is held it is
// offered on word_out, and when taken the accumulator moves by the fixed
// length WORD_W (coarse stage, no multiplexer per shift amount). A segment
// is accepted only when it is certain to fit. flush makes the network
// write out its last, partly filled word with zero padding; empty is high
// when nothing is held and no flush is pending. The total number of
// segment bits accepted since clear is kept in bit_count.
// The two-stage shifting idea follows the document; the word width (16,
// the Hamming data width), the buffer size and the handshake are this
// design's choices.
module output_shift_network
  import prle_pkg::*;
#(
  parameter int unsigned WW    = WORD_W,
  parameter int unsigned SW    = SEG_W,
  parameter int unsigned BUF_W = 40,
  parameter int unsigned CNT_W = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    seg_valid,
  input  logic [SW-1:0]           seg_bits,
  input  logic [$clog2(SW+1)-1:0] seg_len,
  output logic                    seg_ready,
  input  logic                    flush,
  output logic                    word_valid,
  output logic [WW-1:0]           word_out,
  input  logic                    word_ready,
  output logic                    empty,
  output logic [CNT_W-1:0]        bit_count
);
  localparam int unsigned FW = $clog2(BUF_W + 1);
  localparam int unsigned SH = $clog2(BUF_W);

  logic [BUF_W-1:0] acc;       // held bits, left aligned
  logic [FW-1:0]    fill;
  logic             flushing;

  logic             take_word;
  logic [BUF_W-1:0] acc1;
  logic [FW-1:0]    fill1;
  logic [SW-1:0]    seg_mask;
  logic [BUF_W-1:0] seg_placed;
  logic [SH-1:0]    place_amt;

  // Fine stage: move the segment from the bottom of the buffer to just
  // behind the held bits.
  barrel_shifter #(.W(BUF_W)) u_fine (
    .din  ({{(BUF_W-SW){1'b0}}, seg_bits & seg_mask}),
    .shamt(place_amt),
    .dout (seg_placed)
  );

  always_comb begin
    word_out   = acc[BUF_W-1 -: WW];
    word_valid = (fill >= FW'(WW)) || (flushing && fill != 0);
    take_word  = word_valid && word_ready;
    acc1       = take_word ? (acc << WW) : acc;          // coarse stage
    fill1      = take_word ? ((fill >= FW'(WW)) ? fill - FW'(WW) : '0) : fill;
    seg_ready  = !flushing && (fill1 <= FW'(BUF_W - SW));
    place_amt  = SH'(BUF_W - SW) - SH'(fill1);
    seg_mask   = '0;
    for (int i = 0; i < SW; i++)
      if (i >= SW - int'(seg_len)) seg_mask[i] = 1'b1;
    empty      = (fill == 0) && !flushing;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      fill      <= '0;
      flushing  <= 1'b0;
      bit_count <= '0;
    end else if (clear) begin
      acc       <= '0;
      fill      <= '0;
      flushing  <= 1'b0;
      bit_count <= '0;
    end else begin
      if (seg_valid && seg_ready) begin
        acc       <= acc1 | seg_placed;
        fill      <= fill1 + FW'(seg_len);
        bit_count <= bit_count + CNT_W'(seg_len);
      end else begin
        acc  <= acc1;
        fill <= fill1;
      end
      if (flush) flushing <= 1'b1;
      else if (flushing && fill1 == 0 && !(seg_valid && seg_ready)) flushing <= 1'b0;
    end
  end

  // A segment never overruns the accumulator.
  assert property (@(posedge clk) disable iff (!rst_n)
    seg_valid && seg_ready |-> int'(fill1) + int'(seg_len) <= BUF_W);
endmodule
