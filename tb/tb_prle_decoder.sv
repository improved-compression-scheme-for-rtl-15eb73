// tb_prle_decoder: self-checking test of the PRLE decoder.
//
// Streams made by the bit-serial reference encoder are fed to the decoder
// word by word, sometimes with gaps, for several k, thresholds and word
// kinds; the rebuilt word must equal the original. Zero words after the
// end of a stream are always offered, as the controller does. A stream of
// zero words must end with a format error instead of hanging.
module tb_prle_decoder;
  import prle_pkg::*;
  import tb_prle_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic [K_W-1:0]    cfg_k = 4;
  logic              word_valid = 1'b0;
  logic [WORD_W-1:0] word = '0;
  logic              word_ready;
  logic [DATA_W-1:0] dout;
  logic              done, fmt_err;

  int checks = 0, failures = 0;

  prle_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [63:0] d, input int k, input int m,
                         input bit gaps, input bit zeros_only);
    bitq_t       q;
    wordq_t      ws;
    int unsigned ne, nc, idx;
    int          cyc;
    q  = encode(d, m, ne, nc);
    ws = zeros_only ? '{} : pack(q);
    @(negedge clk);
    cfg_k = K_W'(k);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    idx = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      word_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      word       = (idx < ws.size()) ? ws[idx] : '0;
      @(posedge clk);
      if (word_valid && word_ready) idx++;
      @(negedge clk);
      cyc++;
    end
    word_valid = 1'b0;
    checks++;
    if (zeros_only) begin
      if (!done || !fmt_err) begin
        failures++;
        $display("FAIL zero stream: done %b fmt_err %b", done, fmt_err);
      end
    end else if (!done || fmt_err || dout !== d) begin
      failures++;
      $display("FAIL %h k=%0d m=%0d: got %h done %b fmt_err %b", d, k, m, dout, done, fmt_err);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(64'h123FFF605000FFFF, 4, 3, 0, 0);
    run_one(64'h0, 4, 3, 0, 0);
    run_one('1, 8, 3, 0, 0);
    run_one(64'hAAAA_AAAA_AAAA_AAAA, 1, 0, 0, 0);
    run_one(64'hAAAA_AAAA_AAAA_AAAA, 4, 64, 0, 0);
    run_one(64'h0, 4, 3, 0, 1);
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
      run_one(d, k, m, (t % 4 == 0), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
