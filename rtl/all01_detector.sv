// all01_detector: the "all 0/1 detector" of the PRLE encoder.
//
// It observes the first k bits of the window presented by the input-end
// shifting network (bit KMAX-1 is the next bit of the stream) and reports
// whether they are all 0 or all 1. k is the observation width window (OWW)
// chosen by the host, 1..KMAX; a k of 0 is treated as 1 and a k above KMAX
// as KMAX. The bypass output tells the length controller and the RLE
// encoder that the k bits form one uniform group. Combinational.
// The detector's role follows the document; masking the window to a
// run-time k is this design's choice.
module all01_detector
  import prle_pkg::*;
#(
  parameter int unsigned KW = KMAX
) (
  input  logic [KW-1:0]        win,    // next bits, MSB first
  input  logic [$clog2(KW+1)-1:0] k,   // observation width
  output logic                 all0,
  output logic                 all1,
  output logic                 bypass
);
  logic [KW-1:0] mask;   // ones over the first k bits of the window
  int unsigned   keff;

  always_comb begin
    keff = (k == 0) ? 1 : ((int'(k) > KW) ? KW : int'(k));
    mask = '0;
    for (int i = 0; i < KW; i++)
      if (i >= KW - keff) mask[i] = 1'b1;
    all0   = ((win & mask) == '0);
    all1   = ((win | ~mask) == '1);
    bypass = all0 | all1;
  end
endmodule
