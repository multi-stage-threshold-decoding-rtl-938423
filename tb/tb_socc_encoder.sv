// tb_socc_encoder: two blocks of K random columns at the full block length.
// The code columns must carry the information unchanged and the tail-biting
// parity of the reference model. Block 1 has random gaps on both handshakes;
// block 2 has none, and its output must take exactly K cycles.
module tb_socc_encoder;
  import mtd_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = K_BLK;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  col_t in_bits = '0, out_info;
  pcol_t out_par;
  int checks = 0, failures = 0;

  socc_encoder #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      col_t  blk[$];
      pcol_t par[$];
      int n, t0, bad;
      blk = {};
      for (int i = 0; i < K; i++) blk.push_back(col_t'($urandom));
      encode(blk, par);
      n = 0;
      while (n < K) begin
        @(negedge clk);
        in_valid = (b == 1) || ($urandom_range(0, 3) != 0);
        in_bits  = blk[n];
        #1;
        if (in_valid && in_ready) n++;
        @(posedge clk);
      end
      @(negedge clk) in_valid = 0;
      n = 0;
      bad = 0;
      while (n < K) begin
        @(negedge clk);
        out_ready = (b == 1) || ($urandom_range(0, 3) != 0);
        #1;
        if (n == 0) t0 = $time;
        if (out_valid && out_ready) begin
          if (out_info !== blk[n] || out_par !== par[n] || out_last !== (n == K - 1)) bad++;
          n++;
        end
        @(posedge clk);
      end
      @(negedge clk) out_ready = 0;
      checks += 1;
      if (bad != 0) begin
        failures++;
        $display("block %0d: %0d wrong columns", b, bad);
      end
      if (b == 1) begin
        checks++;
        if (($time - t0 + 9) / 10 != K) begin
          failures++;
          $display("output took %0d cycles, expected %0d", ($time - t0 + 9) / 10, K);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
