// prle_pkg: constants and types shared by the parallel run-length (PRLE)
// codec, the Hamming SEC-DED unit and the backup/restore top level.
//
// The data word is 64 bits and one segment header carries a 4-bit length
// field, both as in the document. The observation width window (OWW) k is
// supplied at run time by the host (MCU) and may be 1..KMAX. KMAX, the
// stored word width (16 data bits, from the Hamming block diagram) and the
// widths of the internal buffers are this design's choices.
package prle_pkg;

  // Width of the word that is compressed (n in the document).
  localparam int unsigned DATA_W   = 64;
  localparam int unsigned POS_W    = $clog2(DATA_W + 1);   // 7: counts 0..64
  // Largest observation width k, also N of the input two-stage shifter.
  localparam int unsigned KMAX     = 8;
  localparam int unsigned K_W      = $clog2(KMAX + 1);     // 4
  // Length field of a segment header (four bits, Fig. 4 text).
  localparam int unsigned LEN_W    = 4;
  // Largest copied body: 2**LEN_W - 1 bits.
  localparam int unsigned COPY_MAX = (1 << LEN_W) - 1;     // 15
  // Widest segment: copied segment header (1 + 4) plus a 15-bit body.
  localparam int unsigned SEG_W    = 1 + LEN_W + COPY_MAX; // 20
  localparam int unsigned SEGL_W   = $clog2(SEG_W + 1);    // 5
  // Stored word: 16 data bits protected by 6 check bits (Fig. 5).
  localparam int unsigned WORD_W   = 16;
  localparam int unsigned CODE_W   = 22;
  localparam int unsigned SYN_W    = 5;

  // Hamming error classification reported on ErrorType[1:0].
  typedef enum logic [1:0] {
    ERR_NONE   = 2'b00,  // codeword clean
    ERR_SINGLE = 2'b01,  // one bit flipped, corrected
    ERR_DOUBLE = 2'b10,  // two bits flipped, detected, not correctable
    ERR_INVAL  = 2'b11   // syndrome names no existing bit: multi-bit error
  } err_type_e;

  // A segment travelling from the RLE encoder to the output-end network,
  // left aligned: bit SEG_W-1 is the first bit of the stream.
  typedef struct packed {
    logic [SEG_W-1:0]  bits;
    logic [SEGL_W-1:0] len;
  } segment_t;

endpackage
