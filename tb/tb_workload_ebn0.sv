// tb_workload_ebn0: the J=12, rate 8/10 code with PC bits (overall rate
// R = 0.7843) over BPSK/AWGN at Eb/N0 = 4.8 dB, the operating point quoted
// for CMTDF + PC on this code (about 23 passes on average, bit error rate far
// below 1e-10), decoded once with CMTDF + PC and once with 2SD + PC. Noise:
// sigma^2 = 1 / (2 R Eb/N0) relative to the BPSK amplitude, so sigma = 0.459 A;
// with A = 8 LSB that is 58.8 in units of 1/16 LSB. Full blocks go through the codec at its default
// parameters. The testbench reports channel and decoded bit errors and the
// passes per block, and requires at each point the decoded errors to be at
// least 100 times fewer than the channel errors.
module tb_workload_ebn0;
  import mtd_pkg::*;
  import tb_ref_pkg::*;
  localparam int K       = K_BLK;
  localparam int KI      = K / (N1 + 1) * N1;
  localparam int AMP     = 8;

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, cw_valid, cw_ready = 0, cw_last;
  col_t tx_bits = '0, cw_info, dec_bits;
  pcol_t cw_par;
  logic rx_valid = 0, rx_ready, two_step = 0;
  soft_t rx_yu [M_INFO];
  soft_t rx_yv [N_PAR];
  logic dec_valid, dec_ready = 0, dec_last;
  logic [15:0] iter_count, pc_flips;
  logic ev_pc_stall, ev_pass_w, ev_pass_s, ev_masked, ev_fb, ev_flip, ev_pc_flip;
  int checks = 0, failures = 0;

  mtd_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_point(input string label, input int sigma16, input bit ts, input int nblk);
    longint raw_err, dec_err, passes;
    raw_err = 0;
    dec_err = 0;
    passes = 0;
    two_step = ts;
    for (int b = 0; b < nblk; b++) begin
      col_t  info[$], cwi[$];
      pcol_t cwp[$];
      int n, be;
      info = {};
      cwi = {};
      cwp = {};
      for (int i = 0; i < KI; i++) info.push_back(col_t'($urandom));
      n = 0;
      while (n < KI) begin
        @(negedge clk);
        tx_valid = 1;
        tx_bits  = info[n];
        #1;
        if (tx_ready) n++;
        @(posedge clk);
      end
      @(negedge clk) tx_valid = 0;
      cw_ready = 1;
      while (cwi.size() < K) begin
        @(negedge clk);
        #1;
        if (cw_valid) begin
          cwi.push_back(cw_info);
          cwp.push_back(cw_par);
        end
        @(posedge clk);
      end
      @(negedge clk) cw_ready = 0;
      n = 0;
      while (n < K) begin
        @(negedge clk);
        rx_valid = 1;
        for (int k = 0; k < M_INFO; k++) begin
          rx_yu[k] = chan(cwi[n][k], AMP, sigma16);
          raw_err += longint'(hard(rx_yu[k]) != cwi[n][k]);
        end
        for (int p = 0; p < N_PAR; p++) rx_yv[p] = chan(cwp[n][p], AMP, sigma16);
        #1;
        if (rx_ready) n++;
        @(posedge clk);
      end
      @(negedge clk) rx_valid = 0;
      dec_ready = 1;
      n = 0;
      be = 0;
      while (n < KI) begin
        @(negedge clk);
        #1;
        if (dec_valid) begin
          be += $countones(dec_bits ^ info[n]);
          n++;
        end
        @(posedge clk);
      end
      @(negedge clk) dec_ready = 0;
      dec_err += be;
      passes += iter_count;
      $display("%s block %0d: passes=%0d pc flips=%0d decoded bit errors=%0d", label, b, iter_count, pc_flips, be);
    end
    $display("%s: channel BER=%0.4f (%0d of %0d), decoded errors=%0d, mean passes=%0.1f", label,
             real'(raw_err) / real'(K * M_INFO * nblk), raw_err, K * M_INFO * nblk, dec_err,
             real'(passes) / nblk);
    checks++;
    if (raw_err == 0 || dec_err * 100 > raw_err) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_point("CMTDF+PC 4.8 dB", 59, 1'b0, 3);
    run_point("2SD+PC 4.8 dB", 59, 1'b1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
