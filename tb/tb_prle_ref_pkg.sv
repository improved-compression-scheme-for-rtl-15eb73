// tb_prle_ref_pkg: bit-serial reference model of the threshold run-length
// stream, written independently of the RTL, for the testbenches.
//
// encode() walks the 64-bit word from its MSB one bit at a time, measures
// each chain of equal bits and writes
//   chain length L >  m : 0, v, w (4 bits), L (w bits, w = bit length of L)
//   chain length L <= m : its bits go to a literal buffer, written as
//                         1, c (4 bits), c bits whenever it holds 15 bits,
//                         before an encoded segment, and at the end.
// pack() cuts the stream into 16-bit words, first bit at the MSB, and pads
// the last word with zeros.
package tb_prle_ref_pkg;

  typedef bit bitq_t[$];
  typedef logic [15:0] wordq_t[$];

  function automatic void put_num(ref bitq_t q, input int unsigned v, input int unsigned nb);
    for (int i = int'(nb) - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  function automatic void flush_copy(ref bitq_t q, ref bitq_t lit, ref int unsigned nseg);
    if (lit.size() != 0) begin
      q.push_back(1'b1);
      put_num(q, lit.size(), 4);
      foreach (lit[i]) q.push_back(lit[i]);
      lit.delete();
      nseg++;
    end
  endfunction

  // Returns the stream; counts the segments of each kind.
  function automatic bitq_t encode(input logic [63:0] d, input int unsigned m,
                                   output int unsigned n_enc, output int unsigned n_copy);
    bitq_t q, lit;
    int unsigned i, len, w;
    bit v;
    n_enc  = 0;
    n_copy = 0;
    i = 0;
    while (i < 64) begin
      v   = d[63 - i];
      len = 1;
      while (i + len < 64 && d[63 - i - len] == v) len++;
      i += len;
      if (len > m) begin
        flush_copy(q, lit, n_copy);
        w = 0;
        while ((len >> w) != 0) w++;
        q.push_back(1'b0);
        q.push_back(v);
        put_num(q, w, 4);
        put_num(q, len, w);
        n_enc++;
      end else begin
        for (int unsigned j = 0; j < len; j++) begin
          lit.push_back(v);
          if (lit.size() == 15) flush_copy(q, lit, n_copy);
        end
      end
    end
    flush_copy(q, lit, n_copy);
    return q;
  endfunction

  function automatic wordq_t pack(input bitq_t q);
    wordq_t ws;
    logic [15:0] w;
    for (int unsigned b = 0; b < q.size(); b += 16) begin
      w = '0;
      for (int unsigned j = 0; j < 16; j++)
        if (b + j < q.size()) w[15 - j] = q[b + j];
      ws.push_back(w);
    end
    return ws;
  endfunction

  // Random word built from chains of random lengths, so that long and
  // short chains both occur.
  function automatic logic [63:0] chain_word(input int unsigned maxlen);
    logic [63:0] d;
    int unsigned i, len;
    bit v;
    v = bit'($urandom_range(0, 1));
    i = 0;
    while (i < 64) begin
      len = $urandom_range(1, maxlen);
      for (int unsigned j = 0; j < len && i < 64; j++) begin
        d[63 - i] = v;
        i++;
      end
      v = !v;
    end
    return d;
  endfunction

endpackage
