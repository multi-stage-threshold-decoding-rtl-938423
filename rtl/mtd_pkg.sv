// mtd_pkg: shared sizes, types and the code definition for the multi-stage
// threshold decoding (MTD) codec of a rate 8/10 self-orthogonal convolutional
// code of type 2 (SOCC:TP2).
//
// The code has M_INFO=8 information sequences and N_PAR=2 parity sequences.
// Each information sequence k feeds each parity sequence p through J_PER=6
// taps TAP[k][p][a], so every information bit is protected by J=12
// orthogonal parity checks (d_min = 13). The tap positions are this design's
// own: they were found by a greedy search (each new tap takes the smallest
// value for which, for every ordered pair of parity sequences (p1,p2), all
// differences g1-g2 with g1 in G[k][p1], g2 in G[k][p2], taken over all k,
// stay distinct), then multiplied by 5 so that the minimum tap spacing is 5.
// The largest tap, 1880, lies inside the 5000-stage shift register span.
// Soft values are W=6-bit two's complement samples; a negative sample is a
// hard 1 (BPSK maps bit b to 1-2b).
package mtd_pkg;

  localparam int unsigned M_INFO  = 8;      // information sequences (m)
  localparam int unsigned N_PAR   = 2;      // parity sequences (n)
  localparam int unsigned J_PER   = 6;      // taps per (k,p) tap set
  localparam int unsigned J_TOTAL = N_PAR * J_PER;  // orthogonal checks J
  localparam int unsigned SR_LEN  = 5000;   // shift register span M
  localparam int unsigned K_BLK   = 10506;  // columns per block (incl. PC bits)
  localparam int unsigned N1      = 50;     // information bits per PC bit
  localparam int unsigned W       = 6;      // soft sample width
  localparam int unsigned MAG_W   = W - 1;  // magnitude (reliability) width
  localparam int unsigned L_W     = $clog2((J_TOTAL + 1) * ((1 << MAG_W) - 1) + 1) + 1;

  typedef logic signed [W-1:0]   soft_t;
  typedef logic [MAG_W-1:0]      mag_t;
  typedef logic signed [L_W-1:0] chk_t;

  // Component decoder that is currently iterating.
  typedef enum logic {MODE_WMTD = 1'b0, MODE_SMTD = 1'b1} mode_e;

  // TAP[k][p][a]: delay of tap a from information sequence k into parity p.
  localparam int unsigned TAP [M_INFO][N_PAR][J_PER] = '{
    '{'{0, 5, 90, 285, 635, 1035}, '{0, 45, 190, 440, 805, 1365}},
    '{'{0, 15, 115, 325, 670, 1190}, '{5, 65, 220, 500, 945, 1350}},
    '{'{0, 25, 135, 355, 735, 1250}, '{10, 80, 255, 550, 1000, 1585}},
    '{'{0, 35, 155, 395, 765, 1300}, '{15, 95, 280, 605, 1065, 1660}},
    '{'{0, 45, 185, 430, 695, 1200}, '{20, 115, 295, 630, 935, 1490}},
    '{'{0, 55, 205, 460, 850, 1400}, '{25, 130, 340, 695, 1110, 1800}},
    '{'{0, 65, 230, 500, 920, 1450}, '{30, 150, 370, 770, 1245, 1880}},
    '{'{0, 75, 250, 540, 955, 1640}, '{35, 165, 395, 765, 1300, 1465}}
  };
  localparam int unsigned MAX_TAP = 1880;
  // Smallest difference between two taps of one tap set.
  localparam int unsigned MIN_TAP_SPACING = 5;

  // Hard decision of a soft sample.
  function automatic logic hard(soft_t y);
    return y[W-1];
  endfunction

  // Reliability |y|, saturated to the magnitude range.
  function automatic mag_t mag(soft_t y);
    logic [W-1:0] a;
    a = y[W-1] ? W'(-y) : W'(y);
    return a[W-1] ? '1 : a[MAG_W-1:0];
  endfunction

endpackage
