// cmtdf_ctrl: iteration schedule of combined soft-decision MTD with feedback
// (CMTDF) and of two-step decoding (2SD).
//
// CMTDF alternates two component decoders that share one datapath and differ
// only in their check weights: weighted-bit-flipping MTD (WMTD) first, then
// soft MTD (SMTD). A component keeps iterating while its last pass flipped at
// least one bit, up to MAX_PHASE passes. After the SMTD phase the schedule
// feeds back to WMTD, unless no pass of the round (WMTD phase + SMTD phase)
// flipped anything; then the step ends. A step also ends after MAX_ITER
// passes. With two_step set, a first step runs with parity sequence JS_PAR
// switched off (par_en) and a second step with all parity sequences, which is
// 2SD; otherwise only the full step runs.
// Handshake: the controller pulses iter_go with mode/par_en valid; the
// datapath runs one pass over the block and pulses iter_done, with
// iter_flipped telling whether any bit was flipped. done pulses once at the
// end; fb pulses on each feedback from SMTD to WMTD. Limits are this design's
// choice (the published scheme gives average, not maximum, pass counts). The
// schedule itself follows the published CMTDF and 2SD descriptions.
module cmtdf_ctrl
  import mtd_pkg::*;
#(
  parameter int unsigned MAX_ITER  = 32,   // passes per step
  parameter int unsigned MAX_PHASE = 16,   // passes per component phase
  parameter int unsigned NP        = N_PAR,
  parameter int unsigned JS_PAR    = N_PAR - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          two_step,
  output logic          iter_go,
  input  logic          iter_done,
  input  logic          iter_flipped,
  output mode_e         mode,
  output logic [NP-1:0] par_en,
  output logic          busy,
  output logic          done,
  output logic          fb,
  output logic [15:0]   iter_count    // passes run since start
);

  typedef enum logic [1:0] {S_IDLE, S_GO, S_WAIT} state_e;

  state_e      state;
  logic        step1;        // in the first (masked) step of 2SD
  logic        round_flip;   // some pass of this round flipped a bit
  logic [15:0] step_iters, phase_iters;

  always_comb begin
    par_en = '1;
    if (step1) par_en[JS_PAR] = 1'b0;
  end

  assign iter_go = (state == S_GO);
  assign busy    = (state != S_IDLE);

  // pass bookkeeping once the current pass has finished
  logic [15:0] si, pi;
  logic        rf;
  assign si = step_iters + 1'b1;
  assign pi = phase_iters + 1'b1;
  assign rf = round_flip | iter_flipped;
  // the step ends on its pass limit, or after an SMTD phase when the whole
  // round (WMTD phase + SMTD phase) flipped nothing
  logic end_step;
  assign end_step = (si >= 16'(MAX_ITER)) ||
                    (!(iter_flipped && pi < 16'(MAX_PHASE)) && mode == MODE_SMTD && !rf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      step1       <= 1'b0;
      round_flip  <= 1'b0;
      step_iters  <= '0;
      phase_iters <= '0;
      iter_count  <= '0;
      mode        <= MODE_WMTD;
      done        <= 1'b0;
      fb          <= 1'b0;
    end else begin
      done <= 1'b0;
      fb   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_GO;
          step1       <= two_step;
          round_flip  <= 1'b0;
          step_iters  <= '0;
          phase_iters <= '0;
          iter_count  <= '0;
          mode        <= MODE_WMTD;
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (iter_done) begin
          iter_count <= iter_count + 1'b1;
          state      <= S_GO;
          if (end_step) begin
            if (step1) begin
              step1       <= 1'b0;
              mode        <= MODE_WMTD;
              step_iters  <= '0;
              phase_iters <= '0;
              round_flip  <= 1'b0;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else if (iter_flipped && pi < 16'(MAX_PHASE)) begin
            step_iters  <= si;
            phase_iters <= pi;
            round_flip  <= rf;
          end else if (mode == MODE_WMTD) begin
            mode        <= MODE_SMTD;
            step_iters  <= si;
            phase_iters <= '0;
            round_flip  <= rf;
          end else begin
            mode        <= MODE_WMTD;
            step_iters  <= si;
            phase_iters <= '0;
            round_flip  <= 1'b0;
            fb          <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // pass results are only expected while a pass is outstanding
  a_done_wait: assert property (@(posedge clk) disable iff (!rst_n) iter_done |-> state == S_WAIT);

endmodule
