// socc_encoder: systematic self-orthogonal convolutional encoder, type 2
// (M information sequences, N parity sequences), with tail-biting
// termination.
//
// Parity bit i of sequence p is the XOR over every information sequence k
// and every tap a of u_k(i - TAP[k][p][a]), eq. (1) of the MTD scheme. In a
// streaming encoder the taps are stages of one shift register per
// information sequence; tail biting makes the register start out holding the
// end of the block. This implementation gets the same result by first storing
// the block of K columns and then reading it circularly, so index i-g wraps
// to i-g+K.
// Interface: K columns of M information bits are taken with in_valid/in_ready
// (FILL); then K code columns (the M information bits unchanged and N parity
// bits) are offered with out_valid/out_ready (EMIT), after which the next
// block is taken. Throughput is one column per cycle in each phase.
// Equation and tail biting follow the published scheme; the tap positions
// (mtd_pkg) and the store-then-read structure are this design's own.
module socc_encoder
  import mtd_pkg::*;
#(
  parameter int unsigned K = K_BLK
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M_INFO-1:0] in_bits,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M_INFO-1:0] out_info,
  output logic [N_PAR-1:0]  out_par,
  output logic         out_last      // last column of the block
);

  localparam int unsigned M  = M_INFO;
  localparam int unsigned N  = N_PAR;
  localparam int unsigned IW = $clog2(K);

  logic [M-1:0] ubuf [K];
  logic [IW-1:0] idx;
  logic          emit;

  assign in_ready  = !emit;
  assign out_valid = emit;
  assign out_last  = emit && (idx == IW'(K - 1));
  assign out_info  = ubuf[idx];

  // i - g modulo K, for 0 <= i < K and 0 <= g < K
  function automatic logic [IW-1:0] wrap_sub(logic [IW-1:0] i, int unsigned g);
    int unsigned t;
    t = (int'(i) >= g) ? int'(i) - g : int'(i) + K - g;
    return IW'(t);
  endfunction

  always_comb begin
    for (int unsigned p = 0; p < N; p++) begin
      logic x;
      x = 1'b0;
      for (int unsigned k = 0; k < M; k++)
        for (int unsigned a = 0; a < J_PER; a++)
          x = x ^ ubuf[wrap_sub(idx, TAP[k][p][a])][k];
      out_par[p] = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      emit <= 1'b0;
    end else if (!emit) begin
      if (in_valid) begin
        idx <= (idx == IW'(K - 1)) ? '0 : idx + 1'b1;
        if (idx == IW'(K - 1)) emit <= 1'b1;
      end
    end else if (out_ready) begin
      idx <= (idx == IW'(K - 1)) ? '0 : idx + 1'b1;
      if (idx == IW'(K - 1)) emit <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!emit && in_valid) ubuf[idx] <= in_bits;
  end

  // a code column that is offered stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_info) && $stable(out_par));

  initial begin
    assert (MAX_TAP < SR_LEN) else $error("socc_encoder: taps exceed the shift register span");
    assert (K > MAX_TAP) else $error("socc_encoder: block must be longer than the largest tap");
  end

endmodule
