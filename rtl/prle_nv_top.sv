// prle_nv_top: compressed, error-protected backup of volatile registers
// into nonvolatile registers, plus the window flag codec.
//
// Backup: the 64-bit word on vol_data_in is compressed by the parallel
// run-length encoder (observation width cfg_k, threshold cfg_m, both from
// the host), the packed 16-bit words each get six check bits from the
// Hamming SEC-DED unit, and the 22-bit results are written into the
// nonvolatile registers. Restore: the stored words are read back, checked
// and corrected by the same Hamming unit, and decompressed into
// vol_data_out. The controller sequences both and counts corrected and
// uncorrectable words. The inj_* port flips bits of a stored word to model
// upsets of the nonvolatile cells.
//
// Beside this path, and independent of it, the window flag codec
// (run_len_enc feeding rle_dec) marks all-zero and all-one 4-bit windows of
// fc_data and rebuilds the word from the flags.
//
// Timing: backup_req / restore_req are one-cycle pulses accepted when not
// busy; backup_done / restore_done pulse when finished. vol_data_out is
// valid from restore_done until the next restore. The flag codec has one
// register stage in each of its two halves.
module prle_nv_top
  import prle_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host (MCU) configuration
  input  logic [K_W-1:0]           cfg_k,
  input  logic [POS_W-1:0]         cfg_m,
  // volatile registers
  input  logic                     backup_req,
  input  logic [DATA_W-1:0]        vol_data_in,
  input  logic                     restore_req,
  output logic [DATA_W-1:0]        vol_data_out,
  // status
  output logic                     busy,
  output logic                     backup_done,
  output logic                     restore_done,
  output logic [9:0]               comp_bits,
  output logic [$clog2(DEPTH):0]   comp_words,
  output logic [7:0]               corrected_cnt,
  output logic [7:0]               uncorrectable_cnt,
  output logic                     format_error,
  // live Hamming check of the word being read (valid while restoring)
  output logic [SYN_W-1:0]         ecc_syndrome,
  output logic                     ecc_overall_parity,
  output err_type_e                ecc_error_type,
  // upset injection into the nonvolatile registers
  input  logic                     inj_en,
  input  logic [$clog2(DEPTH)-1:0] inj_addr,
  input  logic [CODE_W-1:0]        inj_mask,
  // window flag codec
  input  logic                     fc_rst,
  input  logic [DATA_W-1:0]        fc_data,
  output logic [DATA_W-1:0]        fc_data_e,
  output logic [DATA_W/4-1:0]      fc_eq_0,
  output logic [DATA_W/4-1:0]      fc_eq_1,
  output logic [DATA_W-1:0]        fc_data_d
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic              enc_start, enc_word_valid, enc_word_ready, enc_done;
  logic [WORD_W-1:0] enc_word;
  logic              dec_start, dec_word_valid, dec_word_ready, dec_done;
  logic [WORD_W-1:0] dec_word;
  logic              use_stored, read_write_b;
  logic              nv_we;
  logic [AW-1:0]     nv_waddr, nv_raddr;
  logic [CODE_W-1:0] nv_wdata, nv_rdata;
  logic [WORD_W-1:0] corrected;
  err_type_e         error_type;

  prle_encoder u_enc (
    .clk, .rst_n, .start(enc_start), .din(vol_data_in),
    .cfg_k, .cfg_m,
    .word_valid(enc_word_valid), .word(enc_word), .word_ready(enc_word_ready),
    .done(enc_done), .bit_count(comp_bits)
  );

  hamming_secded u_ecc (
    .read_write_b, .proc_data(enc_word), .mem_data_out(nv_wdata),
    .mem_data_in(nv_rdata), .proc_read_data(corrected),
    .syndrome(ecc_syndrome), .overall_parity(ecc_overall_parity), .error_type
  );

  nv_register_array #(.W(CODE_W), .DEPTH(DEPTH)) u_nv (
    .clk, .we(nv_we), .waddr(nv_waddr), .wdata(nv_wdata),
    .raddr(nv_raddr), .rdata(nv_rdata),
    .inj_en, .inj_addr, .inj_mask
  );

  assign ecc_error_type = error_type;
  assign dec_word       = use_stored ? corrected : '0;

  prle_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .cfg_k,
    .word_valid(dec_word_valid), .word(dec_word), .word_ready(dec_word_ready),
    .dout(vol_data_out), .done(dec_done), .fmt_err(format_error)
  );

  nvff_controller #(.DEPTH(DEPTH)) u_ctl (
    .clk, .rst_n, .backup_req, .restore_req,
    .enc_start, .enc_word_valid, .enc_word_ready, .enc_done,
    .dec_start, .dec_word_valid, .dec_word_ready, .dec_done, .use_stored,
    .read_write_b, .error_type,
    .nv_we, .nv_waddr, .nv_raddr,
    .busy, .backup_done, .restore_done, .stored_words(comp_words),
    .corrected_cnt, .uncorrectable_cnt
  );

  run_len_enc #(.DATA_W(DATA_W), .K(4)) u_fc_enc (
    .clk, .rst(fc_rst), .data(fc_data),
    .data_e(fc_data_e), .eq_0(fc_eq_0), .eq_1(fc_eq_1)
  );

  rle_dec #(.DATA_W(DATA_W), .K(4)) u_fc_dec (
    .clk, .data_e(fc_data_e), .eq1(fc_eq_1), .eq0(fc_eq_0), .data_d(fc_data_d)
  );
endmodule
