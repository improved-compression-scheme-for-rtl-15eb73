// tb_barrel_shifter: self-checking test of the logarithmic shifter for
// every shift amount of a 16-bit and a 40-bit instance with random data.
module tb_barrel_shifter;
  logic [15:0] d16, q16;
  logic [3:0]  s16;
  logic [39:0] d40, q40;
  logic [5:0]  s40;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(16)) dut16 (.din(d16), .shamt(s16), .dout(q16));
  barrel_shifter #(.W(40)) dut40 (.din(d40), .shamt(s40), .dout(q40));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d16 = 16'($urandom);
      s16 = 4'(t % 16);
      d40 = {8'($urandom), $urandom};
      s40 = 6'(t % 40);
      #1;
      checks += 2;
      if (q16 != 16'(d16 << s16)) begin failures++; $display("FAIL16 %h %0d %h", d16, s16, q16); end
      if (q40 != 40'(d40 << s40)) begin failures++; $display("FAIL40 %h %0d %h", d40, s40, q40); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
