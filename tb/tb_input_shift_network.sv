// tb_input_shift_network: self-checking test of the two-stage input-end
// shifting network. After loading a random word, random advances of 1..8
// bits are applied; at every step the 8-bit window must equal the word's
// bits at the current position (zeros past the end) and remaining must
// count the unused bits.
module tb_input_shift_network;
  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, adv = 1'b0;
  logic [63:0] din = '0;
  logic [3:0]  adv_len = 1;
  logic [7:0]  win;
  logic [6:0]  remaining;
  int checks = 0, failures = 0;

  input_shift_network #(.N_BITS(64), .NS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int pos;
      logic [7:0] exp_win;
      din  = {$urandom, $urandom};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      pos  = 0;
      while (pos < 64) begin
        exp_win = '0;
        for (int i = 0; i < 8; i++) if (pos + i < 64) exp_win[7 - i] = din[63 - pos - i];
        checks++;
        if (win != exp_win || int'(remaining) != 64 - pos) begin
          failures++;
          $display("FAIL pos=%0d win=%b exp=%b rem=%0d", pos, win, exp_win, remaining);
        end
        adv     = ($urandom_range(0, 5) != 0);
        adv_len = 4'($urandom_range(1, 8));
        if (pos + int'(adv_len) > 64) adv_len = 4'(64 - pos);
        @(negedge clk);
        if (adv) pos += int'(adv_len);
        adv = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
