// length_control: the length controller of the PRLE encoder.
//
// From the detector's bypass signal and the observation width k it gives
// the number of bits the input-end shifting network advances in this
// cycle: k when the next k bits are uniform and all lie inside the word,
// otherwise a single bit (serial processing). It also gives the effective
// bypass used by the RLE encoder. The rule "k on bypass, else one bit"
// follows the document's parallel RLE description; guarding the end of the
// word is this design's choice. Combinational.
module length_control
  import prle_pkg::*;
(
  input  logic             bypass,    // from the all 0/1 detector
  input  logic [K_W-1:0]   k,         // observation width from the host
  input  logic [POS_W-1:0] remaining, // bits of the word not yet consumed
  output logic             bypass_eff,
  output logic [K_W-1:0]   shift_len
);
  logic [K_W-1:0] keff;

  always_comb begin
    keff       = (k == 0) ? K_W'(1) : ((k > K_W'(KMAX)) ? K_W'(KMAX) : k);
    bypass_eff = bypass && (POS_W'(keff) <= remaining);
    shift_len  = bypass_eff ? keff : K_W'(1);
  end
endmodule
