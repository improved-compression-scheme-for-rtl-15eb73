// tb_all01_detector: exhaustive self-checking test of the all 0/1 detector
// over every 8-bit window and every k from 0 to 9 (0 acts as 1, above 8 as
// 8), against a bit-by-bit reference.
module tb_all01_detector;
  logic [7:0] win;
  logic [3:0] k;
  logic       all0, all1, bypass;
  int checks = 0, failures = 0;

  all01_detector #(.KW(8)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 0; kk <= 9; kk++)
      for (int w = 0; w < 256; w++) begin
        bit z, o;
        int ke;
        win = 8'(w);
        k   = 4'(kk);
        #1;
        ke = (kk == 0) ? 1 : (kk > 8 ? 8 : kk);
        z = 1; o = 1;
        for (int i = 0; i < ke; i++) begin
          if (win[7 - i]) z = 0;
          else            o = 0;
        end
        checks++;
        if (all0 != z || all1 != o || bypass != (z | o)) begin
          failures++;
          $display("FAIL win=%b k=%0d: %b %b %b", win, kk, all0, all1, bypass);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
