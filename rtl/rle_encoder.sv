// rle_encoder: threshold-based run-length encoder of the PRLE codec.
//
// It walks the word through the input-end shifting network and measures
// each chain of equal bits. When the detector flags k uniform bits that
// continue the current chain, all k are taken in one cycle; otherwise one
// bit is taken. When a chain ends (the next bit differs, or the word is
// exhausted) the chain length L is compared with the host threshold m:
//   L >  m : an encoded segment  0 | v | w[3:0] | L in w bits
//            (v = chain value, w = bit length of L, MSB first)
//   L <= m : the L bits are appended to a copy buffer; a full buffer
//            (15 bits), a following encoded segment or the end of the word
//            closes it as a copied segment  1 | c[3:0] | c literal bits.
// At the end of the word a one-cycle flush tells the output-end network to
// write out its last, zero-padded word, and done is raised.
//
// Segments leave one per cycle on a valid/ready handshake, left aligned
// (bit SEG_W-1 first). start may be given in any state; the input-end
// network must be loaded in the same cycle.
// The segment layout (flag bit, 4-bit length field, body) and the "L <= m
// copies, L > m encodes" rule follow the document. The bit order, the
// 15-bit copy limit, w as the minimal bit length of L, and merging
// neighbouring short chains into one copied segment are this design's
// choices.
module rle_encoder
  import prle_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [POS_W-1:0] thresh_m,    // threshold m from the host
  // from the input-end network, detector and length controller
  input  logic             next_bit,    // first bit of the window
  input  logic             bypass_eff,
  input  logic [K_W-1:0]   shift_len,
  input  logic [POS_W-1:0] remaining,
  output logic             adv,
  output logic [K_W-1:0]   adv_len,
  // segments towards the output-end network
  output logic             seg_valid,
  output segment_t         seg,
  input  logic             seg_ready,
  output logic             flush,
  output logic             done
);
  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_SHORT, S_LONG_COPY, S_LONG_ENC, S_END_COPY, S_FLUSH, S_DONE
  } state_e;

  state_e               state;
  logic                 have_run;
  logic                 run_val;
  logic [POS_W-1:0]     run_len;
  logic [COPY_MAX-1:0]  copy_buf;     // right aligned, oldest bit highest
  logic [LEN_W-1:0]     copy_cnt;

  // Number of bits needed to write run_len (at least 1).
  function automatic logic [LEN_W-1:0] bit_len(input logic [POS_W-1:0] v);
    logic [LEN_W-1:0] r;
    r = 1;
    for (int i = 0; i < POS_W; i++)
      if (v[i]) r = LEN_W'(i + 1);
    return r;
  endfunction

  logic [LEN_W-1:0]    enc_w;
  segment_t            copy_seg, enc_seg;
  logic [LEN_W-1:0]    room;          // free places in the copy buffer
  logic [POS_W-1:0]    take;          // bits of a short chain moved now
  logic [COPY_MAX-1:0] fill_bits;

  always_comb begin
    enc_w         = bit_len(run_len);
    enc_seg.bits  = {1'b0, run_val, enc_w, {(SEG_W-2-LEN_W){1'b0}}}
                  | (SEG_W'(run_len) << (SEG_W - 2 - LEN_W - int'(enc_w)));
    enc_seg.len   = SEGL_W'(2 + LEN_W) + SEGL_W'(enc_w);
    copy_seg.bits = {1'b1, copy_cnt, copy_buf << (COPY_MAX - int'(copy_cnt))};
    copy_seg.len  = SEGL_W'(1 + LEN_W) + SEGL_W'(copy_cnt);
    room          = LEN_W'(COPY_MAX) - copy_cnt;
    take          = (run_len < POS_W'(room)) ? run_len : POS_W'(room);
    fill_bits     = run_val ? COPY_MAX'((1 << take) - 1) : '0;
  end

  // Outputs decided by the state.
  always_comb begin
    adv       = 1'b0;
    adv_len   = shift_len;
    seg_valid = 1'b0;
    seg       = copy_seg;
    flush     = (state == S_FLUSH);
    done      = (state == S_DONE);
    unique case (state)
      S_SCAN:
        if (remaining != 0 && !(have_run && next_bit != run_val)) adv = 1'b1;
      S_SHORT:
        if (copy_cnt == LEN_W'(COPY_MAX)) seg_valid = 1'b1;
      S_LONG_COPY:
        seg_valid = 1'b1;
      S_LONG_ENC: begin
        seg_valid = 1'b1;
        seg       = enc_seg;
      end
      S_END_COPY:
        seg_valid = (copy_cnt != 0);
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      have_run <= 1'b0;
      run_val  <= 1'b0;
      run_len  <= '0;
      copy_buf <= '0;
      copy_cnt <= '0;
    end else if (start) begin
      state    <= S_SCAN;
      have_run <= 1'b0;
      run_len  <= '0;
      copy_buf <= '0;
      copy_cnt <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (remaining == 0 && !have_run) begin
            state <= S_END_COPY;
          end else if (remaining == 0 || next_bit != run_val && have_run) begin
            // the chain has ended: copy it or encode it
            if (run_len > thresh_m)
              state <= (copy_cnt != 0) ? S_LONG_COPY : S_LONG_ENC;
            else
              state <= S_SHORT;
          end else begin
            have_run <= 1'b1;
            run_val  <= next_bit;
            run_len  <= run_len + (bypass_eff ? POS_W'(shift_len) : POS_W'(1));
          end
        end
        S_SHORT: begin
          if (copy_cnt == LEN_W'(COPY_MAX)) begin
            if (seg_ready) begin
              copy_cnt <= '0;
              copy_buf <= '0;
            end
          end else begin
            copy_buf <= (copy_buf << take) | fill_bits;
            copy_cnt <= copy_cnt + LEN_W'(take);
            run_len  <= run_len - take;
            if (run_len == take) begin
              have_run <= 1'b0;
              state    <= S_SCAN;
            end
          end
        end
        S_LONG_COPY:
          if (seg_ready) begin
            copy_cnt <= '0;
            copy_buf <= '0;
            state    <= S_LONG_ENC;
          end
        S_LONG_ENC:
          if (seg_ready) begin
            have_run <= 1'b0;
            run_len  <= '0;
            state    <= S_SCAN;
          end
        S_END_COPY:
          if (copy_cnt == 0 || seg_ready) begin
            copy_cnt <= '0;
            copy_buf <= '0;
            state    <= S_FLUSH;
          end
        S_FLUSH: state <= S_DONE;
        default: ;
      endcase
    end
  end
endmodule
