// tb_output_shift_network: self-checking test of the output-end shifting
// network. Random segments of 1..20 bits are offered, with random
// backpressure on the word side, then a flush; the words taken must be the
// concatenated segment bits, 16 per word, the last one zero padded, and
// bit_count must equal the total segment length.
module tb_output_shift_network;
  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic        seg_valid = 1'b0, seg_ready, flush = 1'b0;
  logic [19:0] seg_bits = '0;
  logic [4:0]  seg_len = '0;
  logic        word_valid, word_ready = 1'b1, empty;
  logic [15:0] word_out;
  logic [9:0]  bit_count;
  int checks = 0, failures = 0;

  output_shift_network #(.WW(16), .SW(20), .BUF_W(40), .CNT_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          ref_bits[$];
  logic [15:0] got[$];

  always @(posedge clk) if (word_valid && word_ready) got.push_back(word_out);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      int nseg, total;
      bit acc;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      got.delete();
      ref_bits.delete();
      nseg  = $urandom_range(1, 30);
      total = 0;
      for (int s = 0; s < nseg; s++) begin
        int len;
        logic [19:0] b;
        len = $urandom_range(1, 20);
        b   = 20'($urandom);          // bits below len are junk: must be ignored
        for (int i = 0; i < len; i++) ref_bits.push_back(b[19 - i]);
        total += len;
        seg_bits  = b;
        seg_len   = 5'(len);
        seg_valid = 1'b1;
        do begin
          word_ready = ($urandom_range(0, 3) != 0);
          #1;
          acc = seg_ready;
          @(negedge clk);
        end while (!acc);
        seg_valid = 1'b0;
      end
      word_ready = 1'b1;
      flush = 1'b1;
      @(negedge clk);
      flush = 1'b0;
      while (!empty) @(negedge clk);
      while (ref_bits.size() % 16 != 0) ref_bits.push_back(1'b0);
      checks++;
      if (got.size() != ref_bits.size() / 16 || int'(bit_count) != total) begin
        failures++;
        $display("FAIL words %0d expected %0d, bits %0d expected %0d",
                 got.size(), ref_bits.size() / 16, bit_count, total);
      end else begin
        foreach (got[w]) begin
          logic [15:0] e;
          for (int i = 0; i < 16; i++) e[15 - i] = ref_bits[16 * w + i];
          checks++;
          if (got[w] != e) begin failures++; $display("FAIL word %0d %h exp %h", w, got[w], e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
