// nvff_controller: sequences backup and restore of the volatile registers
// through the PRLE codec, the Hamming unit and the nonvolatile registers.
//
// Backup (backup_req pulse): starts the encoder, sets the Hamming unit to
// write, and stores each packed word at the next address of the
// nonvolatile registers; when the encoder is done the number of stored
// words is kept and backup_done is raised for one cycle.
// Restore (restore_req pulse): starts the decoder, sets the Hamming unit to
// read, and hands the decoder the corrected words in address order (zero
// words once the stored ones are used up); each word handed over is counted
// as single-error corrected or double/multi-bit error by its error type.
// restore_done is raised for one cycle when the decoder is done. Requests
// are ignored while busy; a backup request wins over a restore request.
// The document names this controller only; this sequence and interface
// are this design's choices.
module nvff_controller
  import prle_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     backup_req,
  input  logic                     restore_req,
  // encoder side
  output logic                     enc_start,
  input  logic                     enc_word_valid,
  output logic                     enc_word_ready,
  input  logic                     enc_done,
  // decoder side
  output logic                     dec_start,
  output logic                     dec_word_valid,
  input  logic                     dec_word_ready,
  input  logic                     dec_done,
  output logic                     use_stored,     // 0: feed a zero word
  // Hamming unit and nonvolatile registers
  output logic                     read_write_b,
  input  err_type_e                error_type,
  output logic                     nv_we,
  output logic [$clog2(DEPTH)-1:0] nv_waddr,
  output logic [$clog2(DEPTH)-1:0] nv_raddr,
  // status
  output logic                     busy,
  output logic                     backup_done,
  output logic                     restore_done,
  output logic [$clog2(DEPTH):0]   stored_words,
  output logic [7:0]               corrected_cnt,
  output logic [7:0]               uncorrectable_cnt
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [2:0] {C_IDLE, C_BK_START, C_BACKUP, C_RS_START, C_RESTORE} state_e;

  state_e    state;
  logic [AW:0] wcount, rcount;
  logic      take;

  assign busy           = (state != C_IDLE);
  assign enc_start      = (state == C_BK_START);
  assign dec_start      = (state == C_RS_START);
  assign enc_word_ready = (state == C_BACKUP);
  assign read_write_b   = (state != C_BACKUP);
  assign nv_we          = (state == C_BACKUP) && enc_word_valid && (wcount < (AW+1)'(DEPTH));
  assign nv_waddr       = AW'(wcount);
  assign nv_raddr       = AW'(rcount);
  assign use_stored     = (rcount < stored_words);
  assign dec_word_valid = (state == C_RESTORE);
  assign take           = dec_word_valid && dec_word_ready && use_stored;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= C_IDLE;
      wcount            <= '0;
      rcount            <= '0;
      stored_words      <= '0;
      backup_done       <= 1'b0;
      restore_done      <= 1'b0;
      corrected_cnt     <= '0;
      uncorrectable_cnt <= '0;
    end else begin
      backup_done  <= 1'b0;
      restore_done <= 1'b0;
      unique case (state)
        C_IDLE:
          if (backup_req) begin
            state  <= C_BK_START;
            wcount <= '0;
          end else if (restore_req) begin
            state             <= C_RS_START;
            rcount            <= '0;
            corrected_cnt     <= '0;
            uncorrectable_cnt <= '0;
          end
        C_BK_START: state <= C_BACKUP;
        C_BACKUP: begin
          if (nv_we) wcount <= wcount + 1'b1;
          if (enc_done) begin
            stored_words <= wcount;
            backup_done  <= 1'b1;
            state        <= C_IDLE;
          end
        end
        C_RS_START: state <= C_RESTORE;
        C_RESTORE: begin
          if (take) begin
            rcount <= rcount + 1'b1;
            if (error_type == ERR_SINGLE) corrected_cnt <= corrected_cnt + 1'b1;
            if (error_type == ERR_DOUBLE || error_type == ERR_INVAL)
              uncorrectable_cnt <= uncorrectable_cnt + 1'b1;
          end
          if (dec_done) begin
            restore_done <= 1'b1;
            state        <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The stream of one word always fits the nonvolatile registers.
  assert property (@(posedge clk) disable iff (!rst_n)
    state == C_BACKUP && enc_word_valid |-> wcount < (AW+1)'(DEPTH));
endmodule
