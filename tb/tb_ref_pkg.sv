// tb_ref_pkg: reference models used by the testbenches, written from the
// code definition and independent of the RTL: PC insertion, tail-biting
// SOCC:TP2 encoding, and a BPSK channel with approximately Gaussian noise
// (sum of 12 uniform variables) quantised to 6-bit soft samples.
package tb_ref_pkg;
  import mtd_pkg::*;

  typedef logic [M_INFO-1:0] col_t;
  typedef logic [N_PAR-1:0]  pcol_t;

  // Insert an even-parity column after every N1 information columns.
  function automatic void pc_insert(input col_t info[$], output col_t blk[$]);
    col_t acc;
    blk = {};
    acc = '0;
    foreach (info[i]) begin
      blk.push_back(info[i]);
      acc = acc ^ info[i];
      if (i % N1 == N1 - 1) begin
        blk.push_back(acc);
        acc = '0;
      end
    end
  endfunction

  // Tail-biting parity of a block of K columns.
  function automatic void encode(input col_t blk[$], output pcol_t par[$]);
    int k_len;
    k_len = blk.size();
    par = {};
    for (int i = 0; i < k_len; i++) begin
      pcol_t v;
      v = '0;
      for (int p = 0; p < N_PAR; p++)
        for (int k = 0; k < M_INFO; k++)
          for (int a = 0; a < J_PER; a++) begin
            int   j;
            col_t c;
            j = (i - int'(TAP[k][p][a]) + k_len) % k_len;
            c = blk[j];
            v[p] = v[p] ^ c[k];
          end
      par.push_back(v);
    end
  endfunction

  // Approximately N(0,1) sample times 16 (sum of 12 uniforms).
  function automatic int gauss16();
    int s;
    s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 4095));
    return (s - 6 * 4095) * 16 / 4095;
  endfunction

  // BPSK amplitude amp for bit b, plus noise of standard deviation sigma16/16,
  // rounded and saturated to a W-bit sample.
  function automatic soft_t chan(logic b, int amp, int sigma16);
    int y;
    y = (b ? -amp : amp) * 16 + gauss16() * sigma16 / 16;
    y = (y >= 0) ? (y + 8) / 16 : -((-y + 8) / 16);
    if (y > 31) y = 31;
    if (y < -32) y = -32;
    return soft_t'(y);
  endfunction
endpackage
