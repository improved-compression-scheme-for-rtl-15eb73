// tb_prle_nv_top: end-to-end self-checking test of the whole design at its
// default size (64-bit words, 32 protected 22-bit words of storage).
//
// Each round backs up a word (chains of random length, random bits, the
// document's example word, all zeros, alternating bits) with a random k and
// threshold m, checks the compressed length and word count against the
// bit-serial reference, optionally flips one or two bits of stored words,
// restores and checks the rebuilt word and the error counters. A zeroed
// storage word forces the decoder's format-error exit. The window flag
// codec is driven alongside with the document's example and random words.
// Every mechanism (uniform k-bit groups, single-bit steps, encoded and
// copied segments, a full copy buffer, a copy closed by a long chain,
// corrected and uncorrectable errors, format error)
// must occur at least once.
module tb_prle_nv_top;
  import prle_pkg::*;
  import tb_prle_ref_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [K_W-1:0]    cfg_k = 4;
  logic [POS_W-1:0]  cfg_m = 4;
  logic              backup_req = 1'b0, restore_req = 1'b0;
  logic [DATA_W-1:0] vol_data_in = '0, vol_data_out;
  logic              busy, backup_done, restore_done, format_error;
  logic [9:0]        comp_bits;
  logic [5:0]        comp_words;
  logic [7:0]        corrected_cnt, uncorrectable_cnt;
  logic [SYN_W-1:0]  ecc_syndrome;
  logic              ecc_overall_parity;
  err_type_e         ecc_error_type;
  logic              inj_en = 1'b0;
  logic [4:0]        inj_addr = '0;
  logic [CODE_W-1:0] inj_mask = '0;
  logic              fc_rst = 1'b1;
  logic [DATA_W-1:0] fc_data = '0, fc_data_e, fc_data_d;
  logic [15:0]       fc_eq_0, fc_eq_1;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_serial = 0, n_enc = 0, n_copy = 0, n_copyfull = 0;
  int n_copy_before_enc = 0, n_corr = 0, n_uncorr = 0, n_fmt = 0;

  prle_nv_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, read from inside the encoder.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc.adv &&  dut.u_enc.bypass_eff) n_bypass++;
    if (dut.u_enc.adv && !dut.u_enc.bypass_eff) n_serial++;
    if (dut.u_enc.seg_valid && dut.u_enc.seg_ready) begin
      if (dut.u_enc.seg.bits[SEG_W-1]) n_copy++;
      else                             n_enc++;
    end
    if (dut.u_enc.u_rle.state == dut.u_enc.u_rle.S_SHORT && dut.u_enc.u_rle.copy_cnt == 15)
      n_copyfull++;
    if (dut.u_enc.u_rle.state == dut.u_enc.u_rle.S_LONG_COPY && dut.u_enc.seg_ready)
      n_copy_before_enc++;
  end

  task automatic check(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wait_pulse(ref logic sig, input int limit, output int cycles);
    cycles = 0;
    while (!sig && cycles < limit) begin
      @(posedge clk);
      #1;
      cycles++;
    end
  endtask

  // upset: 0 none, 1 one bit in each of some words, 2 two bits in one word,
  // 3 the first word zeroed (valid codeword of zero data)
  task automatic round(input logic [63:0] d, input int k, input int m, input int upset);
    bitq_t       q;
    wordq_t      ws;
    int unsigned ne, nc;
    int          cyc, nsingle;
    logic [CODE_W-1:0] stored0;
    q  = encode(d, m, ne, nc);
    ws = pack(q);
    @(negedge clk);
    vol_data_in = d;
    cfg_k = K_W'(k);
    cfg_m = POS_W'(m);
    backup_req = 1'b1;
    @(negedge clk);
    backup_req = 1'b0;
    wait_pulse(backup_done, 3000, cyc);
    check($sformatf("backup of %h finished", d), backup_done);
    check($sformatf("compressed length of %h: %0d vs %0d", d, comp_bits, q.size()),
          int'(comp_bits) == q.size());
    check($sformatf("word count of %h", d), int'(comp_words) == ws.size());
    @(negedge clk);

    nsingle = 0;
    if (upset == 1) begin
      for (int a = 0; a < int'(comp_words); a++)
        if ($urandom_range(0, 1) == 1) begin
          inj_en = 1'b1; inj_addr = 5'(a); inj_mask = CODE_W'(1) << $urandom_range(0, 21);
          nsingle++;
          @(negedge clk);
        end
      inj_en = 1'b0;
    end else if (upset == 2) begin
      int b1;
      b1 = $urandom_range(0, 20);
      inj_en = 1'b1; inj_addr = 5'($urandom_range(0, int'(comp_words) - 1));
      inj_mask = (CODE_W'(1) << b1) | (CODE_W'(1) << $urandom_range(b1 + 1, 21));
      @(negedge clk);
      inj_en = 1'b0;
    end else if (upset == 3) begin
      stored0 = dut.u_nv.mem[0];
      inj_en = 1'b1; inj_addr = '0; inj_mask = stored0;
      @(negedge clk);
      inj_en = 1'b0;
    end

    restore_req = 1'b1;
    @(negedge clk);
    restore_req = 1'b0;
    wait_pulse(restore_done, 3000, cyc);
    check($sformatf("restore of %h finished", d), restore_done);
    case (upset)
      0, 1: begin
        check($sformatf("restored %h k=%0d m=%0d got %h", d, k, m, vol_data_out),
              vol_data_out == d && !format_error);
        check("corrected count", int'(corrected_cnt) == nsingle && uncorrectable_cnt == 0);
        n_corr += int'(corrected_cnt);
      end
      2: begin
        check("double error reported", uncorrectable_cnt >= 1 || format_error);
        if (uncorrectable_cnt != 0) n_uncorr++;
      end
      default: begin
        check("format error on zeroed word", format_error);
        if (format_error) n_fmt++;
      end
    endcase
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // window flag codec: the document's example, then random words
    fc_rst  = 1'b0;
    fc_data = 64'h123FFF605000FFFF;
    @(negedge clk);
    check("flag encoder example", fc_data_e == 64'h1230006050000000
          && fc_eq_0 == 16'h0170 && fc_eq_1 == 16'h1C0F);
    @(negedge clk);
    check("flag decoder example", fc_data_d == 64'h123FFF605000FFFF);
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 16; i++)
        fc_data[4*i +: 4] = ($urandom_range(0, 1) == 1) ? 4'($urandom) : {4{1'($urandom)}};
      @(negedge clk);
      @(negedge clk);
      check("flag codec round trip", fc_data_d == fc_data);
    end

    round(64'h123FFF605000FFFF, 4, 3, 0);
    round(64'h0, 4, 3, 0);
    round(64'hAAAA_AAAA_AAAA_AAAA, 4, 0, 0);   // worst case: 7 stream bits per bit
    round(64'h5555_5555_5555_5555, 1, 64, 1);
    for (int t = 0; t < 120; t++) begin
      automatic int k = $urandom_range(1, 8);
      automatic int m = $urandom_range(0, 12);
      automatic logic [63:0] d = (t % 2 == 0) ? chain_word(16) : chain_word(4);
      if (t % 5 == 4) d = {$urandom, $urandom};
      round(d, k, m, (t % 10 == 3) ? 2 : (t % 10 == 7) ? 3 : (t % 3 == 0) ? 1 : 0);
    end

    check($sformatf("uniform groups %0d", n_bypass), n_bypass > 0);
    check($sformatf("single steps %0d", n_serial), n_serial > 0);
    check($sformatf("encoded segments %0d", n_enc), n_enc > 0);
    check($sformatf("copied segments %0d", n_copy), n_copy > 0);
    check($sformatf("full copy buffers %0d", n_copyfull), n_copyfull > 0);
    check($sformatf("copies closed by long chain %0d", n_copy_before_enc), n_copy_before_enc > 0);
    check($sformatf("corrected words %0d", n_corr), n_corr > 0);
    check($sformatf("uncorrectable rounds %0d", n_uncorr), n_uncorr > 0);
    check($sformatf("format errors %0d", n_fmt), n_fmt > 0);
    $display("groups %0d steps %0d enc %0d copy %0d full %0d copy+enc %0d corrected %0d uncorrectable %0d fmt %0d",
             n_bypass, n_serial, n_enc, n_copy, n_copyfull, n_copy_before_enc,
             n_corr, n_uncorr, n_fmt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
