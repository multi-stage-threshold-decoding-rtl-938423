// tb_pc_decoder: groups of N1+1 random bits with random |checksum| values,
// about half with odd parity. For every group the unit must report a flip
// exactly when the parity is odd, at the first position of the smallest
// |checksum|, one cycle after the group's last bit.
module tb_pc_decoder;
  import mtd_pkg::*;
  localparam int GL = N1 + 1;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  chk_t in_abs_l = '0;
  logic flip_valid;
  logic [$clog2(N1+1)-1:0] flip_off;
  int checks = 0, failures = 0, nflip = 0;

  pc_decoder #(.NG(N1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      int par, best, bestl;
      par = 0; best = 0; bestl = 1 << 20;
      for (int i = 0; i < GL; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_bit   = 1'($urandom);
        in_abs_l = chk_t'($urandom_range(0, (g % 2) ? 20 : 300));
        par ^= int'(in_bit);
        if (int'(in_abs_l) < bestl) begin bestl = int'(in_abs_l); best = i; end
      end
      @(negedge clk);
      in_valid = 0;
      #1;
      checks++;
      if (flip_valid != 1'(par) || (par == 1 && int'(flip_off) != best)) begin
        failures++;
        if (failures < 10) $display("group %0d: fv=%0b off=%0d expected %0d/%0d", g, flip_valid, flip_off, par, best);
      end
      if (flip_valid) nflip++;
      // the report lasts one cycle; some groups are followed by a pause
      @(negedge clk);
      checks++;
      if (flip_valid) failures++;
      if (g % 3 == 0) @(negedge clk);
    end
    checks++;
    if (nflip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
