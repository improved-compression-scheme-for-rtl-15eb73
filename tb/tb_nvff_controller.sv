// tb_nvff_controller: self-checking test of the backup/restore sequencer on
// its own. The testbench plays the encoder (a given number of words, with
// random gaps, then done), the decoder (random word_ready, done after a
// chosen number of words) and the Hamming unit (a chosen error type per
// word). It checks write enables and addresses, the Hamming mode, the
// stored word count, the read addresses (held at the word count once the
// stored words are used up), the stored/zero selection, the error
// counters, the done pulses and that requests are ignored while busy.
module tb_nvff_controller;
  import prle_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       backup_req = 1'b0, restore_req = 1'b0;
  logic       enc_start, enc_word_valid = 1'b0, enc_word_ready, enc_done = 1'b0;
  logic       dec_start, dec_word_valid, dec_word_ready = 1'b0, dec_done = 1'b0, use_stored;
  logic       read_write_b;
  err_type_e  error_type = ERR_NONE;
  logic       nv_we;
  logic [4:0] nv_waddr, nv_raddr;
  logic       busy, backup_done, restore_done;
  logic [5:0] stored_words;
  logic [7:0] corrected_cnt, uncorrectable_cnt;

  int checks = 0, failures = 0;

  nvff_controller #(.DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic backup(input int nwords);
    int written, cyc;
    bit saw_start, saw_done;
    @(negedge clk);
    backup_req = 1'b1;
    @(negedge clk);
    backup_req = 1'b0;
    check("enc_start after backup_req", enc_start && busy);
    @(negedge clk);
    written = 0;
    saw_done = 0;
    cyc = 0;
    while (!saw_done && cyc < 500) begin
      enc_word_valid = (written < nwords) && ($urandom_range(0, 2) != 0);
      enc_done       = (written == nwords);
      restore_req    = (cyc == 3);               // must be ignored while busy
      #1;
      check("write mode during backup", !read_write_b && enc_word_ready);
      check("write enable follows encoder word", nv_we == enc_word_valid);
      if (nv_we) check($sformatf("write address %0d", written), int'(nv_waddr) == written);
      @(negedge clk);
      if (enc_word_valid) written++;
      if (enc_done) saw_done = 1;
      restore_req = 1'b0;
      cyc++;
    end
    enc_word_valid = 1'b0;
    enc_done = 1'b0;
    check("backup_done pulse", backup_done);
    check("stored word count", int'(stored_words) == nwords);
    @(negedge clk);
    check("idle after backup", !busy && !backup_done && !dec_start);
  endtask

  task automatic restore(input int nwords, input int ntake);
    int taken, cyc, exp_corr, exp_unc;
    @(negedge clk);
    restore_req = 1'b1;
    backup_req  = 1'b0;
    @(negedge clk);
    restore_req = 1'b0;
    check("dec_start after restore_req", dec_start && busy);
    @(negedge clk);
    taken = 0; exp_corr = 0; exp_unc = 0; cyc = 0;
    while (taken < ntake && cyc < 500) begin
      dec_word_ready = ($urandom_range(0, 2) != 0);
      error_type     = err_type_e'($urandom_range(0, 3));
      backup_req     = (cyc == 2);               // must be ignored while busy
      #1;
      check("read mode during restore", read_write_b && dec_word_valid);
      check($sformatf("read address %0d", taken), int'(nv_raddr) == ((taken < nwords) ? taken : nwords));
      check("stored or zero word", use_stored == (taken < nwords));
      @(negedge clk);
      if (dec_word_ready) begin
        if (taken < nwords && error_type == ERR_SINGLE) exp_corr++;
        if (taken < nwords && (error_type == ERR_DOUBLE || error_type == ERR_INVAL)) exp_unc++;
        taken++;
      end
      backup_req = 1'b0;
      cyc++;
    end
    dec_word_ready = 1'b0;
    dec_done = 1'b1;
    @(negedge clk);
    dec_done = 1'b0;
    check("restore_done pulse", restore_done);
    check($sformatf("corrected %0d expected %0d", corrected_cnt, exp_corr), int'(corrected_cnt) == exp_corr);
    check($sformatf("uncorrectable %0d expected %0d", uncorrectable_cnt, exp_unc),
          int'(uncorrectable_cnt) == exp_unc);
    @(negedge clk);
    check("idle after restore", !busy && !enc_start);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && read_write_b && !nv_we);
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(1, 28);
      backup(n);
      restore(n, n + $urandom_range(0, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
