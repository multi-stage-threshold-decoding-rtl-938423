// tb_mtd_codec_top: end-to-end test of the codec at its default (full) size.
// Random information columns go through the transmit side (PC encoder and
// SOCC:TP2 encoder), the code columns through a modelled BPSK/AWGN channel
// into the receive side, and the decoded columns are compared with what was
// sent. Three blocks: (1) noise plus ~1% wrong-sign samples, CMTDF; (2) noisy
// block plus information bits received wrong with full confidence, which
// only PC decoding can repair; (3) as (1) with two-step decoding. Every
// mechanism of the design must occur at least once: PC-encoder stall, WMTD
// pass, SMTD pass, feedback, bit flip, masked (2SD) pass and PC flip.
module tb_mtd_codec_top;
  import mtd_pkg::*;
  import tb_ref_pkg::*;
  localparam int K  = K_BLK;
  localparam int KI = K / (N1 + 1) * N1;

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
  int n_stall = 0, n_w = 0, n_s = 0, n_masked = 0, n_fb = 0, n_flip = 0, n_pcflip = 0;

  mtd_codec_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_pc_stall) n_stall++;
    if (ev_pass_w)   n_w++;
    if (ev_pass_s)   n_s++;
    if (ev_masked)   n_masked++;
    if (ev_fb)       n_fb++;
    if (ev_flip)     n_flip++;
    if (ev_pc_flip)  n_pcflip++;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(input int kind, input bit ts);
    col_t  info[$], cwi[$];
    pcol_t cwp[$];
    soft_t yu [][M_INFO];
    soft_t yv [][N_PAR];
    int n, bad, ce;
    info = {};
    cwi = {};
    cwp = {};
    for (int i = 0; i < KI; i++) info.push_back(col_t'($urandom));
    // transmit
    n = 0;
    while (n < KI) begin
      @(negedge clk);
      tx_valid = ($urandom_range(0, 4) != 0);
      tx_bits  = info[n];
      #1;
      if (tx_valid && tx_ready) n++;
      @(posedge clk);
    end
    @(negedge clk) tx_valid = 0;
    while (cwi.size() < K) begin
      @(negedge clk);
      cw_ready = ($urandom_range(0, 4) != 0);
      #1;
      if (cw_valid && cw_ready) begin
        cwi.push_back(cw_info);
        cwp.push_back(cw_par);
        check(cw_last == (cwi.size() == K), "cw_last position");
      end
      @(posedge clk);
    end
    @(negedge clk) cw_ready = 0;
    // channel
    yu = new[K];
    yv = new[K];
    for (int i = 0; i < K; i++) begin
      for (int k = 0; k < M_INFO; k++) begin
        yu[i][k] = chan(cwi[i][k], 12, 24);
        if ($urandom_range(0, 99) == 0) yu[i][k] = chan(!cwi[i][k], 3, 0);
      end
      for (int p = 0; p < N_PAR; p++) begin
        yv[i][p] = chan(cwp[i][p], 12, 24);
        if ($urandom_range(0, 99) == 0) yv[i][p] = chan(!cwp[i][p], 3, 0);
      end
    end
    if (kind == 2) begin
      for (int e = 0; e < 3; e++) begin
        int i, k;
        i = 700 + 3100 * e;
        k = 3 * e;
        yu[i][k] = chan(!cwi[i][k], 31, 0);
        for (int p = 0; p < N_PAR; p++)
          for (int a = 0; a < J_PER; a++) begin
            int j;
            j = (i + int'(TAP[k][p][a])) % K;
            yv[j][p] = chan(cwp[j][p], 1, 0);
          end
      end
    end
    ce = 0;
    for (int i = 0; i < K; i++)
      for (int k = 0; k < M_INFO; k++) ce += int'(hard(yu[i][k]) != cwi[i][k]);
    // receive
    two_step = ts;
    n = 0;
    while (n < K) begin
      @(negedge clk);
      rx_valid = 1;
      rx_yu = yu[n];
      rx_yv = yv[n];
      #1;
      if (rx_ready) n++;
      @(posedge clk);
    end
    @(negedge clk) rx_valid = 0;
    n = 0;
    bad = 0;
    while (n < KI) begin
      @(negedge clk);
      dec_ready = ($urandom_range(0, 7) != 0);
      #1;
      if (dec_valid && dec_ready) begin
        if (dec_bits !== info[n] || dec_last !== (n == KI - 1)) bad++;
        n++;
      end
      @(posedge clk);
    end
    @(negedge clk) dec_ready = 0;
    $display("block kind=%0d two_step=%0d: channel bit errors=%0d passes=%0d pc flips=%0d wrong columns=%0d",
             kind, ts, ce, iter_count, pc_flips, bad);
    check(ce > 0, "channel must introduce errors");
    check(bad == 0, $sformatf("block kind %0d: %0d wrong decoded columns", kind, bad));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(1, 0);
    run_block(2, 0);
    run_block(1, 1);
    $display("events: pc stalls=%0d WMTD passes=%0d SMTD passes=%0d feedbacks=%0d flip cycles=%0d masked passes=%0d pc flips=%0d",
             n_stall, n_w, n_s, n_fb, n_flip, n_masked, n_pcflip);
    check(n_stall == 3 * (KI / N1), "one PC-encoder stall per group");
    check(n_w > 0, "WMTD pass");
    check(n_s > 0, "SMTD pass");
    check(n_fb > 0, "feedback SMTD -> WMTD");
    check(n_flip > 0, "bit flips");
    check(n_masked > 0, "masked first-step pass (2SD)");
    check(n_pcflip >= 3, "PC decoding flips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
