// tb_hamming_secded: self-checking test of the Hamming SEC-DED unit.
//
// For random and corner data words the written 22-bit word is checked
// against a reference built here from the position rule (check bit j
// covers positions with bit j set, even overall parity). Reading back the
// clean word, every single-bit flip and random double flips must give the
// expected data, syndrome and error type.
module tb_hamming_secded;
  import prle_pkg::*;

  logic              read_write_b;
  logic [WORD_W-1:0] proc_data;
  logic [CODE_W-1:0] mem_data_out, mem_data_in;
  logic [WORD_W-1:0] proc_read_data;
  logic [SYN_W-1:0]  syndrome;
  logic              overall_parity;
  err_type_e         error_type;

  int checks = 0, failures = 0;

  hamming_secded dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CODE_W-1:0] ref_code(input logic [15:0] d);
    logic [21:0] c;
    int unsigned n;
    c = '0;
    n = 0;
    for (int unsigned p = 1; p <= 21; p++)
      if ((p & (p - 1)) != 0) begin
        c[p-1] = d[n];
        n++;
      end
    for (int unsigned j = 0; j < 5; j++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p <= 21; p++)
        if ((p & (1 << j)) != 0 && p != (1 << j)) par ^= c[p-1];
      c[(1 << j) - 1] = par;
    end
    c[21] = ^c[20:0];
    return c;
  endfunction

  task automatic check(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s data=%h", what, proc_data);
    end
  endtask

  initial begin
    logic [21:0] cw;
    for (int t = 0; t < 400; t++) begin
      proc_data = (t == 0) ? 16'h0000 : (t == 1) ? 16'hFFFF : 16'($urandom);
      read_write_b = 1'b0;
      mem_data_in  = '0;
      #1;
      cw = ref_code(proc_data);
      check("write word", mem_data_out == cw);
      read_write_b = 1'b1;
      mem_data_in  = cw;
      #1;
      check("clean read", proc_read_data == proc_data && error_type == ERR_NONE && syndrome == 0);
      for (int b = 0; b < 22; b++) begin
        mem_data_in = cw ^ (22'd1 << b);
        #1;
        check("single flip", proc_read_data == proc_data && error_type == ERR_SINGLE
              && overall_parity && syndrome == ((b == 21) ? 5'd0 : 5'(b + 1)));
      end
      for (int r = 0; r < 8; r++) begin
        int b1, b2;
        b1 = $urandom_range(0, 21);
        b2 = (b1 + $urandom_range(1, 21)) % 22;
        mem_data_in = cw ^ (22'd1 << b1) ^ (22'd1 << b2);
        #1;
        check("double flip", error_type == ERR_DOUBLE && !overall_parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
