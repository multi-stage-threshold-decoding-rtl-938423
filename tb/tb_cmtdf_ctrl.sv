// tb_cmtdf_ctrl: a scripted datapath answers each iter_go after a few cycles
// with a chosen "flipped" value. The sequence of component modes, parity
// masks, feedback pulses and the end of decoding are compared with the
// expected CMTDF / 2SD schedule, including the iteration limits.
module tb_cmtdf_ctrl;
  import mtd_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, two_step = 0;
  logic iter_go, iter_done = 0, iter_flipped = 0, busy, done, fb;
  mode_e mode;
  logic [N_PAR-1:0] par_en;
  logic [15:0] iter_count;
  int checks = 0, failures = 0;

  cmtdf_ctrl #(.MAX_ITER(10), .MAX_PHASE(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one decoding; flips[i] is what pass i reports. Returns the modes seen
  // ("W"/"S", lower case when a parity sequence is masked) and the feedbacks.
  task automatic run(input bit ts, input bit flips[$], output string modes, output int nfb);
    int pass = 0;
    modes = "";
    nfb = 0;
    @(negedge clk);
    two_step = ts;
    start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      @(posedge clk);
      if (fb) nfb++;
      if (done) break;
      if (iter_go) begin
        string c;
        c = (mode == MODE_WMTD) ? "W" : "S";
        if (!(&par_en)) c = c.tolower();
        modes = {modes, c};
        repeat ($urandom_range(1, 4)) @(posedge clk);
        @(negedge clk);
        iter_done = 1;
        iter_flipped = (pass < flips.size()) ? flips[pass] : 1'b0;
        pass++;
        @(negedge clk);
        iter_done = 0;
      end
    end
  endtask

  task automatic expect_run(input bit ts, input bit flips[$], input string exp, input int exp_fb);
    string got;
    int nfb;
    run(ts, flips, got, nfb);
    checks++;
    if (got != exp || nfb != exp_fb || int'(iter_count) != exp.len()) begin
      failures++;
      $display("schedule %s fb=%0d iters=%0d, expected %s fb=%0d", got, nfb, iter_count, exp, exp_fb);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // nothing to correct: one WMTD pass, one SMTD pass
    expect_run(0, '{0, 0}, "WS", 0);
    // WMTD flips twice, SMTD flips once, feedback, then a quiet round
    expect_run(0, '{1, 1, 0, 1, 0, 0, 0}, "WWWSSWS", 1);
    // phase limit (4) then step limit (10)
    expect_run(0, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1}, "WWWWSSSSWW", 1);
    // two-step decoding: masked step, then the full step
    expect_run(1, '{1, 0, 0, 0, 0}, "wwswsWS", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
