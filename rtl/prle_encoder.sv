// prle_encoder: parallel run-length (PRLE) encoder of one n-bit word.
//
// Structure of the encoder block diagram: the input-end two-stage shifting
// network shows the next bits of the word; the all 0/1 detector checks the
// first k of them; the length controller turns its bypass signal into the
// shift length (k or 1); the threshold RLE encoder measures chains and
// emits encoded or copied segments (at most SEG_W = q bits); the output-end
// shifting network packs the segments into 16-bit words.
//
// Interface: pulse start with the word on din and k, m held steady until
// done. Packed words leave on word_valid/word_ready in stream order; done
// rises once the last (zero padded) word has been taken, and bit_count then
// holds the compressed length in bits. Latency depends on the data: one
// cycle per uniform group of k bits or per single bit, plus one cycle per
// segment and per change from a short to a long chain.
module prle_encoder
  import prle_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] din,
  input  logic [K_W-1:0]    cfg_k,       // observation width window k
  input  logic [POS_W-1:0]  cfg_m,       // threshold m
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  input  logic              word_ready,
  output logic              done,
  output logic [9:0]        bit_count
);
  logic [KMAX-1:0]  win;
  logic [POS_W-1:0] remaining;
  logic             bypass, bypass_eff;
  logic [K_W-1:0]   shift_len, adv_len;
  logic             adv;
  logic             seg_valid, seg_ready, flush, enc_done, pk_empty;
  segment_t         seg;

  input_shift_network #(.N_BITS(DATA_W), .NS(KMAX)) u_in (
    .clk, .rst_n, .load(start), .din,
    .adv, .adv_len, .win, .remaining
  );

  all01_detector #(.KW(KMAX)) u_det (
    .win, .k(cfg_k), .all0(), .all1(), .bypass
  );

  length_control u_len (
    .bypass, .k(cfg_k), .remaining, .bypass_eff, .shift_len
  );

  rle_encoder u_rle (
    .clk, .rst_n, .start, .thresh_m(cfg_m),
    .next_bit(win[KMAX-1]), .bypass_eff, .shift_len, .remaining,
    .adv, .adv_len,
    .seg_valid, .seg, .seg_ready, .flush, .done(enc_done)
  );

  output_shift_network #(.WW(WORD_W), .SW(SEG_W), .BUF_W(40), .CNT_W(10)) u_out (
    .clk, .rst_n, .clear(start),
    .seg_valid, .seg_bits(seg.bits), .seg_len(seg.len), .seg_ready,
    .flush, .word_valid, .word_out(word), .word_ready,
    .empty(pk_empty), .bit_count
  );

  assign done = enc_done && pk_empty;
endmodule
