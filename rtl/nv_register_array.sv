// nv_register_array: the nonvolatile registers that keep the compressed,
// Hamming-protected backup of the volatile registers.
//
// DEPTH words of W bits with one write port and one combinational read
// port. The inj_* port flips the bits set in inj_mask in one word, which
// models the single-bit, multi-bit and burst upsets the error-correcting
// code is there to handle. Here the array is ordinary flip-flops: the
// nonvolatile cell technology (FeRAM, MRAM, ...) is outside the logic and
// not modelled. Write and injection to the same word in one cycle: the
// write wins. The array is not reset, as nonvolatile storage would not be.
// DEPTH = 32 holds the worst case of one 64-bit word (seven stream bits
// per data bit with threshold 0, 448 bits, 28 words); the document names
// the block only.
module nv_register_array
  import prle_pkg::*;
#(
  parameter int unsigned W     = CODE_W,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  input  logic                     inj_en,
  input  logic [$clog2(DEPTH)-1:0] inj_addr,
  input  logic [W-1:0]             inj_mask
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)                                   mem[waddr]    <= wdata;
    if (inj_en && !(we && waddr == inj_addr)) mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
  end

  assign rdata = mem[raddr];
endmodule
