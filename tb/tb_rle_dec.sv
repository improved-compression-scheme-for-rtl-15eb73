// tb_rle_dec: self-checking test of the window flag decoder with the
// document's example (1230006050000000, eq1 1C0F, eq0 0170 give
// 123FFF605000FFFF) and random flag/data combinations against a
// nibble-by-nibble reference.
module tb_rle_dec;
  logic        clk = 1'b0;
  logic [63:0] data_e = '0, data_d;
  logic [15:0] eq1 = '0, eq0 = '0;
  int checks = 0, failures = 0;

  rle_dec #(.DATA_W(64), .K(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] de, input logic [15:0] f1, input logic [15:0] f0,
                       input logic [63:0] exp_d);
    data_e = de; eq1 = f1; eq0 = f0;
    @(negedge clk);
    checks++;
    if (data_d != exp_d) begin
      failures++;
      $display("FAIL %h %h %h: %h expected %h", de, f1, f0, data_d, exp_d);
    end
  endtask

  initial begin
    @(negedge clk);
    apply(64'h1230006050000000, 16'h1C0F, 16'h0170, 64'h123FFF605000FFFF);
    for (int t = 0; t < 300; t++) begin
      logic [63:0] de, ed;
      logic [15:0] f1, f0;
      de = {$urandom, $urandom};
      f1 = 16'($urandom);
      f0 = 16'($urandom);
      for (int i = 0; i < 16; i++)
        ed[4*i +: 4] = f1[i] ? 4'hF : (f0[i] ? 4'h0 : de[4*i +: 4]);
      apply(de, f1, f0, ed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
