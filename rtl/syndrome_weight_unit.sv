// syndrome_weight_unit: initial syndrome bit and weighted-bit-flipping weight
// of one parity check.
//
// A parity check at time t of parity sequence p covers the received parity
// sample y_v and the NIN received information samples y_u that the encoder
// XORed into that parity bit. The unit outputs
//   s    = hard(y_v) XOR (XOR of hard(y_u))      -- the syndrome bit, eq. (2)
//   smag = |y_v|                                   -- the SMTD weight
//   wmin = min(|y_v|, min |y_u|)                   -- the WMTD weight
// Combinational. The decoder evaluates it once per check before the first
// iteration; during decoding the syndrome bit is then kept up to date by
// flipping, and both weights stay fixed. Both weight rules follow the
// published scheme; the 5-bit saturated magnitudes are this design's choice.
module syndrome_weight_unit
  import mtd_pkg::*;
#(
  parameter int unsigned NIN = M_INFO * J_PER
) (
  input  soft_t y_v,         // received parity sample
  input  soft_t y_u [NIN],   // received information samples in the check
  output logic  s,           // syndrome bit
  output mag_t  smag,        // magnitude of the parity sample
  output mag_t  wmin         // minimum magnitude over the whole check
);

  always_comb begin
    logic x;
    mag_t m;
    x = hard(y_v);
    m = mag(y_v);
    for (int unsigned i = 0; i < NIN; i++) begin
      x = x ^ hard(y_u[i]);
      if (mag(y_u[i]) < m) m = mag(y_u[i]);
    end
    s    = x;
    smag = mag(y_v);
    wmin = m;
  end

endmodule
