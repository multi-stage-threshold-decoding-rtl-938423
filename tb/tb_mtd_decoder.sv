// tb_mtd_decoder: full-length blocks (K = 10506 columns, 8 + 2 sequences)
// encoded by the reference model, sent through a modelled BPSK channel and
// decoded. Four blocks:
//   A  noise free: output exact, one WMTD and one SMTD pass, and the decoding
//      time must match the schedule: K init cycles, 1 start cycle, per pass
//      ceil(K/NSET/NW)*M + 2 cycles, 1 hand-over cycle, K*M PC cycles and 1 more;
//   B  ~1% of all samples received with the wrong sign: CMTDF must correct
//      every information bit;
//   C  a few information bits received wrong with full confidence while their
//      checks are weak: MTD cannot move them, PC decoding must;
//   D  as B, decoded with two-step decoding (first step with one parity
//      sequence off).
module tb_mtd_decoder;
  import mtd_pkg::*;
  import tb_ref_pkg::*;
  localparam int K    = K_BLK;
  localparam int NSET = 2;
  localparam int NW   = MIN_TAP_SPACING;
  localparam int STEPS = (K / NSET + NW - 1) / NW;
  localparam int KI   = K / (N1 + 1) * N1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, two_step = 0;
  soft_t in_yu [M_INFO];
  soft_t in_yv [N_PAR];
  logic out_valid, out_ready = 0, out_last;
  col_t out_bits;
  logic [15:0] iter_count, pc_flips;
  logic ev_pass_w, ev_pass_s, ev_masked, ev_fb, ev_flip, ev_pc_flip;
  int checks = 0, failures = 0;
  int n_w, n_s, n_masked, n_fb, n_flipcyc, n_pcflip;

  mtd_decoder #(.K(K), .NSET(NSET), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_pass_w)  n_w++;
    if (ev_pass_s)  n_s++;
    if (ev_masked)  n_masked++;
    if (ev_fb)      n_fb++;
    if (ev_flip)    n_flipcyc++;
    if (ev_pc_flip) n_pcflip++;
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

  // kind: 0 noise free, 1 random wrong signs, 2 confident wrong bits
  task automatic run_block(input int kind, input bit ts, output int cyc, output int chan_err);
    col_t  info[$], blk[$];
    pcol_t par[$];
    soft_t yu [][M_INFO];
    soft_t yv [][N_PAR];
    int n, bad, t_load;
    info = {};
    for (int i = 0; i < KI; i++) info.push_back(col_t'($urandom));
    pc_insert(info, blk);
    encode(blk, par);
    yu = new[K];
    yv = new[K];
    chan_err = 0;
    for (int i = 0; i < K; i++) begin
      for (int k = 0; k < M_INFO; k++) begin
        yu[i][k] = chan(blk[i][k], 12, (kind == 0) ? 0 : 24);
        if (kind == 1 && $urandom_range(0, 99) == 0) yu[i][k] = chan(!blk[i][k], 3, 0);
      end
      for (int p = 0; p < N_PAR; p++) begin
        yv[i][p] = chan(par[i][p], 12, (kind == 0) ? 0 : 24);
        if (kind == 1 && $urandom_range(0, 99) == 0) yv[i][p] = chan(!par[i][p], 3, 0);
      end
    end
    if (kind == 2) begin
      for (int e = 0; e < 4; e++) begin
        int i, k;
        i = 120 + 2500 * e;
        k = 2 * e;
        yu[i][k] = chan(!blk[i][k], 31, 0);
        for (int p = 0; p < N_PAR; p++)
          for (int a = 0; a < J_PER; a++) begin
            int j;
            j = (i + int'(TAP[k][p][a])) % K;
            yv[j][p] = chan(par[j][p], 1, 0);
          end
      end
    end
    for (int i = 0; i < K; i++)
      for (int k = 0; k < M_INFO; k++) chan_err += int'(hard(yu[i][k]) != blk[i][k]);
    // load
    two_step = ts;
    n = 0;
    while (n < K) begin
      @(negedge clk);
      in_valid = 1;
      in_yu = yu[n];
      in_yv = yv[n];
      #1;
      if (in_ready) n++;
      @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    t_load = $time;
    // unload
    n = 0;
    bad = 0;
    cyc = -1;
    while (n < KI) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 7) != 0);
      #1;
      if (out_valid && cyc < 0) cyc = ($time - t_load) / 10;
      if (out_valid && out_ready) begin
        if (out_bits !== info[n] || out_last !== (n == KI - 1)) bad++;
        n++;
      end
      @(posedge clk);
    end
    @(negedge clk) out_ready = 0;
    check(bad == 0, $sformatf("block kind %0d: %0d wrong output columns", kind, bad));
  endtask

  initial begin
    int cyc, ce, exp_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;

    n_w = 0; n_s = 0; n_fb = 0; n_flipcyc = 0; n_pcflip = 0; n_masked = 0;
    run_block(0, 0, cyc, ce);
    exp_cyc = K + 1 + 2 * (STEPS * M_INFO + 2) + 1 + K * M_INFO + 1;
    $display("A: cycles=%0d expected=%0d iters=%0d", cyc, exp_cyc, iter_count);
    check(ce == 0 && n_flipcyc == 0 && pc_flips == 0, "A: noise-free block must need no flips");
    check(n_w == 1 && n_s == 1 && iter_count == 2, "A: one WMTD and one SMTD pass");
    check(cyc == exp_cyc, $sformatf("A: decoding took %0d cycles, expected %0d", cyc, exp_cyc));

    n_w = 0; n_s = 0; n_fb = 0; n_flipcyc = 0; n_pcflip = 0;
    run_block(1, 0, cyc, ce);
    $display("B: channel errors=%0d iters=%0d W=%0d S=%0d fb=%0d flip cycles=%0d pc=%0d cycles=%0d",
             ce, iter_count, n_w, n_s, n_fb, n_flipcyc, pc_flips, cyc);
    check(ce > 500 && n_flipcyc > 0 && n_fb > 0, "B: errors must be present and corrected by flips");

    n_pcflip = 0;
    run_block(2, 0, cyc, ce);
    $display("C: channel errors=%0d iters=%0d pc flips=%0d", ce, iter_count, pc_flips);
    check(pc_flips == 4 && n_pcflip == 4, "C: PC decoding must flip the four confident errors");

    n_masked = 0; n_w = 0;
    run_block(1, 1, cyc, ce);
    $display("D: channel errors=%0d iters=%0d masked passes=%0d", ce, iter_count, n_masked);
    check(n_masked >= 2 && int'(iter_count) >= n_masked + 2, "D: two-step decoding must run masked and full passes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
