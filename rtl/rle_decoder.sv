// rle_decoder: RLE decoding module of the PRLE decoder.
//
// It reads segments from the window of the decoder's input-end network and
// produces the original bits, at most k per cycle, towards the output-end
// network, until the n bits of the word are rebuilt:
//   0 | v | w[3:0] | L (w bits)  ->  L copies of v, k per cycle
//   1 | c[3:0] | c bits          ->  the c bits, k per cycle
// A header is taken in one cycle once all its bits are available. A
// segment that cannot come from the encoder (w = 0, L = 0 or c = 0) raises
// fmt_err and ends the word, so corrupted storage cannot hang the decoder;
// a chain longer than the bits still missing is cut short.
// The segment layout follows the document; one header per cycle, k output
// bits per cycle and the error exit are this design's choices.
module rle_decoder
  import prle_pkg::*;
#(
  parameter int unsigned WIN_W = 24,
  parameter int unsigned AV_W  = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [K_W-1:0]             cfg_k,
  input  logic [WIN_W-1:0]           win,
  input  logic [AV_W-1:0]            avail,
  output logic [$clog2(WIN_W+1)-1:0] consume,
  output logic                       out_valid,
  output logic [KMAX-1:0]            out_bits,
  output logic [K_W-1:0]             out_cnt,
  output logic                       done,
  output logic                       fmt_err
);
  localparam int unsigned CW = $clog2(WIN_W + 1);

  typedef enum logic [2:0] {D_IDLE, D_HDR, D_RUN, D_COPY, D_DONE} state_e;

  state_e           state;
  logic             run_val;
  logic [POS_W-1:0] rem;        // bits left in the current segment
  logic [POS_W-1:0] produced;   // bits of the word rebuilt so far

  logic [K_W-1:0]   keff;
  logic [POS_W-1:0] missing;
  logic [LEN_W-1:0] hdr_w, hdr_c;
  logic [15:0]      hdr_len;
  logic [POS_W-1:0] grp;        // bits produced in this cycle
  logic [KMAX-1:0]  grp_mask;

  always_comb begin
    keff    = (cfg_k == 0) ? K_W'(1) : ((cfg_k > K_W'(KMAX)) ? K_W'(KMAX) : cfg_k);
    missing = POS_W'(DATA_W) - produced;
    hdr_w   = win[WIN_W-3 -: LEN_W];
    hdr_c   = win[WIN_W-2 -: LEN_W];
    hdr_len = 16'((win << (2 + LEN_W)) >> (WIN_W - int'(hdr_w)));
    grp     = (rem < POS_W'(keff)) ? rem : POS_W'(keff);
    if (missing < grp) grp = missing;
    if (state == D_COPY && POS_W'(avail) < grp) grp = POS_W'(avail);
    grp_mask = '0;
    for (int i = 0; i < KMAX; i++)
      if (i >= KMAX - int'(grp)) grp_mask[i] = 1'b1;

    consume   = '0;
    out_valid = 1'b0;
    out_bits  = '0;
    out_cnt   = K_W'(grp);
    done      = (state == D_DONE);
    unique case (state)
      D_HDR:
        if (produced != POS_W'(DATA_W)) begin
          if (!win[WIN_W-1]) begin
            if (avail >= AV_W'(2 + LEN_W) + AV_W'(hdr_w))
              consume = CW'(2 + LEN_W) + CW'(hdr_w);
          end else if (avail >= AV_W'(1 + LEN_W)) begin
            consume = CW'(1 + LEN_W);
          end
        end
      D_RUN: begin
        out_valid = (grp != 0);
        out_bits  = run_val ? grp_mask : '0;
      end
      D_COPY: begin
        out_valid = (grp != 0);
        out_bits  = win[WIN_W-1 -: KMAX] & grp_mask;
        consume   = CW'(grp);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_IDLE;
      run_val  <= 1'b0;
      rem      <= '0;
      produced <= '0;
      fmt_err  <= 1'b0;
    end else if (start) begin
      state    <= D_HDR;
      rem      <= '0;
      produced <= '0;
      fmt_err  <= 1'b0;
    end else begin
      unique case (state)
        D_HDR:
          if (produced == POS_W'(DATA_W)) begin
            state <= D_DONE;
          end else if (consume != 0) begin
            if (!win[WIN_W-1]) begin
              if (hdr_w == 0 || hdr_len == 0) begin
                fmt_err <= 1'b1;
                state   <= D_DONE;
              end else begin
                run_val <= win[WIN_W-2];
                rem     <= (hdr_len > 16'(missing)) ? missing : POS_W'(hdr_len);
                state   <= D_RUN;
              end
            end else if (hdr_c == 0) begin
              fmt_err <= 1'b1;
              state   <= D_DONE;
            end else begin
              rem   <= (POS_W'(hdr_c) > missing) ? missing : POS_W'(hdr_c);
              state <= D_COPY;
            end
          end
        D_RUN, D_COPY:
          if (grp != 0) begin
            produced <= produced + grp;
            rem      <= rem - grp;
            if (rem == grp) state <= D_HDR;
          end
        default: ;
      endcase
    end
  end
endmodule
