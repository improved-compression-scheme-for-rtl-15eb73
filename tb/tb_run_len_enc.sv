// tb_run_len_enc: self-checking test of the window flag encoder with the
// document's example word 123FFF605000FFFF (data_e 1230006050000000, eq_0
// 0170, eq_1 1C0F) and random words with many uniform nibbles, against a
// nibble-by-nibble reference; reset must clear the outputs.
module tb_run_len_enc;
  logic        clk = 1'b0, rst = 1'b1;
  logic [63:0] data = '0, data_e;
  logic [15:0] eq_0, eq_1;
  int checks = 0, failures = 0;

  run_len_enc #(.DATA_W(64), .K(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] d, input logic [63:0] ee,
                       input logic [15:0] e0, input logic [15:0] e1);
    data = d;
    @(negedge clk);
    checks++;
    if (data_e != ee || eq_0 != e0 || eq_1 != e1) begin
      failures++;
      $display("FAIL %h: %h %h %h expected %h %h %h", d, data_e, eq_0, eq_1, ee, e0, e1);
    end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (data_e != 0 || eq_0 != 0 || eq_1 != 0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    apply(64'h123FFF605000FFFF, 64'h1230006050000000, 16'h0170, 16'h1C0F);
    for (int t = 0; t < 300; t++) begin
      logic [63:0] d, ee;
      logic [15:0] e0, e1;
      for (int i = 0; i < 16; i++) begin
        case ($urandom_range(0, 2))
          0: d[4*i +: 4] = 4'h0;
          1: d[4*i +: 4] = 4'hF;
          default: d[4*i +: 4] = 4'($urandom);
        endcase
        e0[i] = (d[4*i +: 4] == 4'h0);
        e1[i] = (d[4*i +: 4] == 4'hF);
        ee[4*i +: 4] = e1[i] ? 4'h0 : d[4*i +: 4];
      end
      apply(d, ee, e0, e1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
