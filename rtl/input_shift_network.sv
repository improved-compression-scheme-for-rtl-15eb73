// input_shift_network: the two-stage hierarchical shifting network that
// feeds the PRLE encoder.
//
// A load copies the n-bit word from the volatile registers into a shift
// register whose MSB is the first bit of the stream. The next KMAX bits are
// taken from the first 2N bits of that register by a 2N-bit barrel shifter
// (fine stage, shift 0..N-1). Whenever the fine offset would reach N, the
// register itself moves by the fixed length N (coarse stage, wiring only,
// no multiplexer per shift amount) and the offset wraps. An advance of
// adv_len bits (1..N) takes effect at the next clock edge; the window is
// valid in the same cycle as the position it shows.
// The two-stage structure follows the document; N = KMAX and zero fill
// after the end of the word are this design's choices.
module input_shift_network
  import prle_pkg::*;
#(
  parameter int unsigned N_BITS = DATA_W,   // word width n
  parameter int unsigned NS     = KMAX      // coarse shift N, also window width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic [N_BITS-1:0]            din,
  input  logic                         adv,
  input  logic [$clog2(NS+1)-1:0]      adv_len,   // 1..NS
  output logic [NS-1:0]                win,       // next bits, MSB first
  output logic [$clog2(N_BITS+1)-1:0]  remaining  // bits not yet consumed
);
  localparam int unsigned PW = $clog2(N_BITS + 1);
  localparam int unsigned OW = $clog2(2 * NS);

  logic [N_BITS-1:0] sreg;
  logic [OW-1:0]     off;      // fine offset, always < NS
  logic [PW-1:0]     pos;
  logic [2*NS-1:0]   fine_out;
  logic [OW:0]       off_sum;

  barrel_shifter #(.W(2 * NS)) u_fine (
    .din  (sreg[N_BITS-1 -: 2*NS]),
    .shamt(off),
    .dout (fine_out)
  );

  assign win       = fine_out[2*NS-1 -: NS];
  assign remaining = PW'(N_BITS) - pos;
  assign off_sum   = {1'b0, off} + (OW+1)'(adv_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      off  <= '0;
      pos  <= PW'(N_BITS);
    end else if (load) begin
      sreg <= din;
      off  <= '0;
      pos  <= '0;
    end else if (adv) begin
      pos <= pos + PW'(adv_len);
      if (off_sum >= (OW+1)'(NS)) begin
        sreg <= sreg << NS;                 // coarse stage: fixed shift by N
        off  <= OW'(off_sum - (OW+1)'(NS));
      end else begin
        off  <= OW'(off_sum);
      end
    end
  end
endmodule
