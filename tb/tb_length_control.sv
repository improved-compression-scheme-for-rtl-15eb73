// tb_length_control: exhaustive self-checking test of the length
// controller: shift by k on a bypass that fits inside the word, else by 1.
module tb_length_control;
  logic       bypass, bypass_eff;
  logic [3:0] k, shift_len;
  logic [6:0] remaining;
  int checks = 0, failures = 0;

  length_control dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int kk = 0; kk < 16; kk++)
        for (int r = 0; r <= 64; r++) begin
          int ke;
          bit be;
          bypass = 1'(b); k = 4'(kk); remaining = 7'(r);
          #1;
          ke = (kk == 0) ? 1 : (kk > 8 ? 8 : kk);
          be = b && ke <= r;
          checks++;
          if (bypass_eff != be || int'(shift_len) != (be ? ke : 1)) begin
            failures++;
            $display("FAIL b=%0d k=%0d r=%0d: %b %0d", b, kk, r, bypass_eff, shift_len);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
