// tb_cse: random vectors through the checksum-threshold element, compared
// with an integer evaluation of L = sum en*w*(1-2s) + wd*(1-2d) and its sign.
// Extreme vectors (all checks against, all for) are included.
module tb_cse;
  import mtd_pkg::*;
  localparam int unsigned J = J_TOTAL;

  logic [J-1:0] syn, en;
  mag_t         w [J];
  logic         d, flip;
  mag_t         wd;
  chk_t         l;
  int checks = 0, failures = 0, nflip = 0;

  cse #(.J(J)) dut (.syn, .w, .en, .d, .wd, .l, .flip);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ref_l;
      syn = J'($urandom);
      en  = (t % 3 == 0) ? '1 : J'($urandom);
      d   = 1'($urandom);
      wd  = mag_t'($urandom);
      for (int c = 0; c < J; c++) w[c] = mag_t'($urandom);
      if (t == 0) begin syn = '1; en = '1; d = 0; wd = '1; foreach (w[c]) w[c] = '1; end
      if (t == 1) begin syn = '0; en = '1; d = 1; wd = '1; foreach (w[c]) w[c] = '1; end
      #1;
      ref_l = d ? -int'(wd) : int'(wd);
      for (int c = 0; c < J; c++) if (en[c]) ref_l += syn[c] ? -int'(w[c]) : int'(w[c]);
      checks++;
      if (int'(l) != ref_l || flip != (ref_l < 0)) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d L=%0d ref=%0d flip=%0b", t, l, ref_l, flip);
      end
      if (flip) nflip++;
    end
    checks++;
    if (nflip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
