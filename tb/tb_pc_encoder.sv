// tb_pc_encoder: random columns with random valid and out_ready gaps. Every
// (N1+1)-th output column must be the even parity of the N1 before it, the
// others must be the inputs in order, and the encoder must stall its input
// once per group (rate N1/(N1+1)).
module tb_pc_encoder;
  import mtd_pkg::*;
  localparam int unsigned M = M_INFO;
  localparam int NGROUPS = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_is_pc;
  logic [M-1:0] in_bits, out_bits;
  int checks = 0, failures = 0, stalls = 0;
  logic [M-1:0] sent[$], got[$];
  logic         gotpc[$];

  pc_encoder #(.M(M), .NG(N1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_bits);
      gotpc.push_back(out_is_pc);
    end
    if (rst_n && in_valid && out_ready && !in_ready) stalls++;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent.size() < NGROUPS * N1) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 7) != 0);
      in_valid = ($urandom_range(0, 5) != 0);
      in_bits  = M'($urandom);
      #1;
      if (in_valid && in_ready) sent.push_back(in_bits);
      @(posedge clk);
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    // check the stream
    begin
      int si = 0;
      logic [M-1:0] acc = '0;
      for (int i = 0; i < got.size(); i++) begin
        checks++;
        if (i % (N1 + 1) == N1) begin
          if (got[i] !== acc || !gotpc[i]) failures++;
          acc = '0;
        end else begin
          if (got[i] !== sent[si] || gotpc[i]) failures++;
          acc ^= got[i];
          si++;
        end
      end
      checks++;
      if (got.size() != NGROUPS * (N1 + 1)) begin
        failures++;
        $display("got %0d columns, expected %0d", got.size(), NGROUPS * (N1 + 1));
      end
      checks++;
      if (stalls == 0) failures++;
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
