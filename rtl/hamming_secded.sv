// hamming_secded: Hamming single-error-correcting, double-error-detecting
// unit for 16-bit words, shared by the write and the read path.
//
// Write (read_write_b = 0): six check bits are generated from proc_data and
// the 22-bit memory word mem_data_out is formed. Read (read_write_b = 1):
// the same generator works on the data part of mem_data_in, the syndrome
// is the XOR of the regenerated and the stored Hamming check bits, and the
// overall parity of the whole stored word tells a single error (odd) from a
// double error (even, non-zero syndrome). A single error in a data bit is
// corrected on proc_read_data; error_type reports
// 00 none, 01 single (corrected), 10 double, 11 syndrome names no bit.
//
// Code layout: word bit p-1 holds Hamming position p (1..21); positions 1,
// 2, 4, 8 and 16 are the check bits P0..P4, each covering the positions
// whose number has that bit set; the data bits fill the other positions,
// data bit 0 at position 3; bit 21 is the overall parity P5 (even parity
// over all 22 bits). Purely combinational.
// The 16/22-bit widths, the shared generator with its 2:1 multiplexer,
// the syndrome and overall-parity based classification and the position
// rule follow the document; the bit placement and the error_type codes
// are this design's choices.
module hamming_secded
  import prle_pkg::*;
(
  input  logic              read_write_b,    // 1 read, 0 write
  input  logic [WORD_W-1:0] proc_data,       // data to store
  output logic [CODE_W-1:0] mem_data_out,    // word to store
  input  logic [CODE_W-1:0] mem_data_in,     // word read back
  output logic [WORD_W-1:0] proc_read_data,  // corrected data
  output logic [SYN_W-1:0]  syndrome,
  output logic              overall_parity,  // 1: odd number of flips
  output err_type_e         error_type
);
  localparam int unsigned NPOS = CODE_W - 1;   // 21 Hamming positions

  // Hamming position of data bit i.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned p, n;
    n = 0;
    p = 0;
    for (int unsigned q = 1; q <= NPOS; q++) begin
      if ((q & (q - 1)) != 0) begin
        if (n == i) p = q;
        n++;
      end
    end
    return p;
  endfunction

  logic [WORD_W-1:0] data_mem;      // data part of the stored word
  logic [WORD_W-1:0] gen_in;        // output of the 2:1 multiplexer
  logic [5:0]        gen_parity;    // P0..P5
  logic [4:0]        mem_parity;
  logic [NPOS:1]     cw;            // positions 1..21 being written

  always_comb begin
    for (int unsigned i = 0; i < WORD_W; i++)
      data_mem[i] = mem_data_in[data_pos(i) - 1];
    gen_in = read_write_b ? data_mem : proc_data;

    // Check bit j covers every data position with bit j set.
    gen_parity = '0;
    for (int unsigned j = 0; j < SYN_W; j++)
      for (int unsigned i = 0; i < WORD_W; i++)
        if (((data_pos(i) >> j) & 1) != 0) gen_parity[j] ^= gen_in[i];
    gen_parity[5] = ^{gen_in, gen_parity[4:0]};

    // Write word.
    cw = '0;
    for (int unsigned i = 0; i < WORD_W; i++) cw[data_pos(i)] = proc_data[i];
    for (int unsigned j = 0; j < SYN_W; j++) cw[1 << j] = gen_parity[j];
    mem_data_out = {gen_parity[5], cw};

    // Read check.
    for (int unsigned j = 0; j < SYN_W; j++) mem_parity[j] = mem_data_in[(1 << j) - 1];
    syndrome       = gen_parity[4:0] ^ mem_parity;
    overall_parity = ^mem_data_in;

    if (syndrome == 0 && !overall_parity)  error_type = ERR_NONE;
    else if (!overall_parity)              error_type = ERR_DOUBLE;
    else if (int'(syndrome) > NPOS)        error_type = ERR_INVAL;
    else                                   error_type = ERR_SINGLE;

    proc_read_data = data_mem;
    if (error_type == ERR_SINGLE)
      for (int unsigned i = 0; i < WORD_W; i++)
        if (data_pos(i) == int'(syndrome)) proc_read_data[i] = ~data_mem[i];
  end
endmodule
