// tb_syndrome_weight_unit: random soft samples; the syndrome must equal the
// XOR of all sign bits and the weight the smallest saturated magnitude.
module tb_syndrome_weight_unit;
  import mtd_pkg::*;
  localparam int unsigned NIN = M_INFO * J_PER;

  soft_t y_v;
  soft_t y_u [NIN];
  logic  s;
  mag_t  smag, wmin;
  int checks = 0, failures = 0;

  syndrome_weight_unit #(.NIN(NIN)) dut (.y_v, .y_u, .s, .smag, .wmin);

  function automatic int absq(soft_t y);
    int a;
    a = (int'(y) < 0) ? -int'(y) : int'(y);
    return (a > 31) ? 31 : a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int rs, rw, rm;
      y_v = soft_t'($urandom);
      // mostly large magnitudes so the minimum is informative
      foreach (y_u[i]) y_u[i] = ($urandom_range(0, 9) == 0) ? soft_t'($urandom) :
                                 soft_t'(($urandom_range(0, 1) ? 1 : -1) * int'($urandom_range(20, 31)));
      if (t % 4 == 0) y_v = soft_t'(-32);
      #1;
      rs = int'(y_v < 0);
      rm = absq(y_v);
      rw = rm;
      foreach (y_u[i]) begin
        rs ^= int'(y_u[i] < 0);
        if (absq(y_u[i]) < rw) rw = absq(y_u[i]);
      end
      checks++;
      if (int'(s) != rs || int'(smag) != rm || int'(wmin) != rw) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d s=%0b/%0d smag=%0d/%0d wmin=%0d/%0d", t, s, rs, smag, rm, wmin, rw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
