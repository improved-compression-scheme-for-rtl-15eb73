// tb_nv_register_array: self-checking test of the nonvolatile register
// array: random writes, reads of every word against a shadow copy, bit
// flips by the injection port, and a write winning over an injection to
// the same word.
module tb_nv_register_array;
  logic        clk = 1'b0, we = 1'b0, inj_en = 1'b0;
  logic [4:0]  waddr = '0, raddr = '0, inj_addr = '0;
  logic [21:0] wdata = '0, rdata, inj_mask = '0;
  logic [21:0] shadow [32];
  int checks = 0, failures = 0;

  nv_register_array #(.W(22), .DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      raddr = 5'(a);
      #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < 32; a++) begin
      we = 1'b1; waddr = 5'(a); wdata = 22'($urandom); shadow[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    check_all();
    for (int t = 0; t < 200; t++) begin
      we       = ($urandom_range(0, 1) == 1);
      waddr    = 5'($urandom);
      wdata    = 22'($urandom);
      inj_en   = ($urandom_range(0, 1) == 1);
      inj_addr = (t % 5 == 0) ? waddr : 5'($urandom);
      inj_mask = 22'($urandom);
      if (inj_en && !(we && waddr == inj_addr)) shadow[inj_addr] ^= inj_mask;
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 1'b0; inj_en = 1'b0;
      if (t % 20 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
