// tb_prle_encoder: self-checking test of the PRLE encoder.
//
// Words of several kinds (chains of random length, all zeros, all ones,
// alternating bits, random bits, the patterns of the document's examples)
// are encoded for several k and thresholds m, and the packed words and the
// bit count are compared with the bit-serial reference model. The number
// of advance cycles over the parallel RLE example pattern
// 0 1 1 0 1 | k zeros | 1 1 | 2k zeros | 0 1 (3k+9 bits) is checked:
// 12 cycles with k = 4, against 3k+9 = 21 when k = 1 (serial).
module tb_prle_encoder;
  import prle_pkg::*;
  import tb_prle_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic [DATA_W-1:0] din = '0;
  logic [K_W-1:0]    cfg_k = 4;
  logic [POS_W-1:0]  cfg_m = 4;
  logic              word_valid, word_ready, done;
  logic [WORD_W-1:0] word;
  logic [9:0]        bit_count;

  int checks = 0, failures = 0;
  int adv_cycles;
  int bypass_seen = 0, copyfull_seen = 0;

  prle_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.adv && dut.bypass_eff) bypass_seen++;
    if (dut.u_rle.state == dut.u_rle.S_SHORT && dut.u_rle.copy_cnt == 15) copyfull_seen++;
  end

  task automatic run_one(input logic [63:0] d, input int k, input int m, input bit stall);
    bitq_t       q;
    wordq_t      exp_w, got_w;
    int unsigned ne, nc;
    int          cyc;
    q     = encode(d, m, ne, nc);
    exp_w = pack(q);
    @(negedge clk);
    din   = d;
    cfg_k = K_W'(k);
    cfg_m = POS_W'(m);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      word_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (word_valid && word_ready) got_w.push_back(word);
      @(negedge clk);
      cyc++;
    end
    word_ready = 1'b1;
    checks++;
    if (got_w.size() != exp_w.size()) begin
      failures++;
      $display("FAIL %h k=%0d m=%0d: %0d words, expected %0d", d, k, m, got_w.size(), exp_w.size());
    end else begin
      foreach (exp_w[i]) if (got_w[i] !== exp_w[i]) begin
        failures++;
        $display("FAIL %h k=%0d m=%0d word %0d: %h expected %h", d, k, m, i, got_w[i], exp_w[i]);
        break;
      end
    end
    checks++;
    if (bit_count != 10'(q.size())) begin
      failures++;
      $display("FAIL %h k=%0d m=%0d: bit_count %0d expected %0d", d, k, m, bit_count, q.size());
    end
  endtask

  // Cycles in which the input network advances until 3k+9 bits are used.
  task automatic count_advances(input logic [63:0] d, input int k, input int nbits, output int n);
    @(negedge clk);
    din   = d;
    cfg_k = K_W'(k);
    cfg_m = 7'd64;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (int'(DATA_W) - int'(dut.remaining) < nbits) begin
      @(posedge clk);
      if (dut.adv) n++;
      @(negedge clk);
    end
    while (!done) @(negedge clk);
  endtask

  logic [63:0] pat;
  int          n;

  initial begin
    word_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Parallel RLE example with k = 4: 0 1 1 0 1, 4 zeros, 1 1, 8 zeros,
    // 0 1, followed by alternating bits.
    pat = 64'h0;
    pat[63 -: 21] = 21'b01101_0000_11_00000000_01;
    pat[42] = 1'b0;
    for (int i = 41; i >= 0; i--) pat[i] = ~pat[i+1];
    count_advances(pat, 4, 21, n);
    checks++;
    if (n != 12) begin failures++; $display("FAIL parallel cycles %0d, expected 12", n); end
    count_advances(pat, 1, 21, n);
    checks++;
    if (n != 21) begin failures++; $display("FAIL serial cycles %0d, expected 21", n); end

    run_one(64'h123FFF605000FFFF, 4, 3, 0);
    run_one(64'h0, 4, 3, 0);
    run_one('1, 8, 3, 0);
    run_one(64'hAAAA_AAAA_AAAA_AAAA, 4, 3, 0);
    run_one(64'hAAAA_AAAA_AAAA_AAAA, 4, 0, 0);
    run_one(64'hAAAA_AAAA_AAAA_AAAA, 2, 64, 0);
    run_one(pat, 4, 2, 0);
    for (int t = 0; t < 300; t++) begin
      automatic int k = $urandom_range(0, 9);
      automatic int m = $urandom_range(0, 20);
      automatic logic [63:0] d;
      case (t % 3)
        0: d = chain_word(12);
        1: d = chain_word(3);
        default: d = {$urandom, $urandom};
      endcase
      if (t % 7 == 0) m = $urandom_range(0, 70);
      run_one(d, k, m, (t % 4 == 0));
    end
    checks++;
    if (bypass_seen == 0 || copyfull_seen == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised: bypass %0d copy-full %0d", bypass_seen, copyfull_seen);
    end
    $display("bypass groups %0d, full copy buffers %0d", bypass_seen, copyfull_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
