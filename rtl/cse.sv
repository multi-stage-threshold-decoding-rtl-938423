// cse: checksum-threshold element (CSE) of the multi-stage threshold decoder.
//
// For the information bit under decoding it forms the soft checksum
//   L = sum_c en[c] * w[c] * (1 - 2*s[c])  +  wd * (1 - 2*d)
// over its J orthogonal parity checks c, where s[c] is the current syndrome
// bit of check c, w[c] its reliability weight, d the bit's difference-register
// bit and wd the magnitude of its received information sample. A negative
// checksum means the checks outvote the current decision, and flip is raised;
// L = 0 does not flip. Checks whose en bit is low are left out of the sum
// (used by the first step of two-step decoding).
// Purely combinational; the caller applies the flip to the difference
// register and to the J syndrome bits in the same clock edge.
// The checksum and the flip rule follow the published MTD scheme; treating
// L = 0 as "no flip" and the 10-bit checksum width are this design's choices.
module cse
  import mtd_pkg::*;
#(
  parameter int unsigned J = J_TOTAL
) (
  input  logic [J-1:0] syn,   // syndrome bit of each check
  input  mag_t         w [J], // weight of each check
  input  logic [J-1:0] en,    // check used in this decoding step
  input  logic         d,     // difference-register bit of the bit
  input  mag_t         wd,    // magnitude of the received information sample
  output chk_t         l,     // checksum value
  output logic         flip   // l < 0: flip the bit
);

  always_comb begin
    chk_t acc;
    acc = d ? -chk_t'(wd) : chk_t'(wd);
    for (int unsigned c = 0; c < J; c++) begin
      if (en[c]) acc = syn[c] ? acc - chk_t'(w[c]) : acc + chk_t'(w[c]);
    end
    l    = acc;
    flip = acc[L_W-1];
  end

endmodule
