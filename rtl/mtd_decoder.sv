// mtd_decoder: block decoder for the tail-biting SOCC:TP2 code, using
// multi-stage threshold decoding with a difference register (MTD), the
// combined WMTD/SMTD schedule with feedback (CMTDF), optional two-step
// decoding (2SD) and parity-check (PC) decoding.
//
// How it works. One block of K received columns (M information samples and
// N parity samples each) is stored. An initial pass computes every syndrome
// bit s_p(t) from the hard decisions and, for WMTD, the weight of every check
// (smallest magnitude of the samples in it). The difference register (DR)
// starts at zero. A decoding pass then visits each information bit u_k(i):
// the checksum-threshold element (CSE) adds the J checks s_p(i+g) on it,
// weighted by wmin (WMTD) or by the parity sample magnitude |y_v| (SMTD), plus
// the bit's own magnitude, and when the checksum is negative the DR bit and
// all J syndrome bits are inverted in the same clock edge. The decoded bit is
// hard(y_u) XOR DR. cmtdf_ctrl decides which component runs each pass and
// when to stop. Then PC decoding streams every information sequence through
// pc_decoder, which recomputes each bit's checksum and, in a group of N1+1
// bits with odd parity, flips the bit of smallest |checksum|.
//
// Parallel CSEs. Two bits u_k(i) and u_k(i+e) of one sequence share no
// syndrome when 0 < e < MIN_TAP_SPACING, since every tap difference of the
// code is at least that large. So a set of NW <= MIN_TAP_SPACING CSEs decodes
// positions i .. i+NW-1 of sequence k in one cycle. Tail biting lets decoding
// start anywhere, so NSET such sets work on i, i+K/NSET, i+2K/NSET, ...: each
// set only touches syndromes in [i, i+NW-1+MAX_TAP], and with
// K/NSET > MAX_TAP+NW-1 those windows are disjoint. A pass therefore takes
// ceil(K/NSET/NW)*M cycles (NSET*NW = 10 bits per cycle at the defaults).
//
// Interface and timing. LOAD: K columns with in_valid/in_ready (1/cycle).
// INIT: K cycles, then 1 cycle to start the schedule. Each pass:
// ceil(K/NSET/NW)*M + 2 cycles. After the last pass 1 cycle, then PC: K*M + 1 cycles. OUT:
// the decoded information columns, PC columns removed, with
// out_valid/out_ready; out_last marks the block's last column. Then the next
// block is loaded. two_step is sampled when decoding starts.
// The whole update of a bit is one combinational cycle here; a fast
// implementation would pipeline it; the published scheme does not go to that
// level. The decoding rules, both weightings, the schedule, PC decoding and
// both kinds of CSE parallelism follow the published scheme; the block
// storage, 6-bit samples, decoding order (sequence k fastest) and the
// one-bit-per-cycle PC pass are this design's choices.
module mtd_decoder
  import mtd_pkg::*;
#(
  parameter int unsigned K         = K_BLK,
  parameter int unsigned NSET      = 2,                // CSE sets, K/NSET apart
  parameter int unsigned NW        = MIN_TAP_SPACING,  // CSEs per set, adjacent bits
  parameter bit          PC_EN     = 1'b1,
  parameter int unsigned MAX_ITER  = 32,
  parameter int unsigned MAX_PHASE = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // received block
  input  logic              in_valid,
  output logic              in_ready,
  input  soft_t             in_yu [M_INFO],
  input  soft_t             in_yv [N_PAR],
  input  logic              two_step,
  // decoded information
  output logic              out_valid,
  input  logic              out_ready,
  output logic [M_INFO-1:0] out_bits,
  output logic              out_last,
  // status and events
  output logic [15:0]       iter_count,   // passes used for the last block
  output logic [15:0]       pc_flips,     // bits flipped by PC decoding
  output logic              ev_pass_w,    // a WMTD pass starts
  output logic              ev_pass_s,    // an SMTD pass starts
  output logic              ev_masked,    // a pass starts with a parity sequence off
  output logic              ev_fb,        // feedback SMTD -> WMTD
  output logic              ev_flip,      // at least one CSE flips a bit this cycle
  output logic              ev_pc_flip    // PC decoding flips a bit
);

  localparam int unsigned M   = M_INFO;
  localparam int unsigned N   = N_PAR;
  localparam int unsigned J   = J_TOTAL;
  localparam int unsigned NIN = M_INFO * J_PER;
  localparam int unsigned IW  = $clog2(K);
  localparam int unsigned KW  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned SEG = K / NSET;            // positions per CSE set
  localparam int unsigned NC  = NSET * NW;          // CSEs in total
  localparam int unsigned LASTSTEP = ((SEG + NW - 1) / NW - 1) * NW;
  localparam int unsigned GL  = N1 + 1;            // PC group length
  localparam int unsigned GW  = $clog2(GL);

  typedef enum logic [2:0] {S_LOAD, S_INIT, S_ITER, S_PC, S_PC_TAIL, S_OUT} state_e;

  // block memories
  soft_t        yu   [K][M];   // received information samples
  soft_t        yv   [K][N];   // received parity samples
  mag_t         wmin [K][N];   // WMTD weight of each check
  logic [N-1:0] syn  [K];      // syndrome register
  logic [M-1:0] dr   [K];      // difference register

  state_e        state;
  logic [IW-1:0] pos;          // column counter (LOAD, INIT, PC, OUT)
  logic [KW-1:0] kk;           // information sequence counter
  logic          running;      // a decoding pass is in progress
  logic          pass_flip;    // the running pass flipped a bit
  logic          iter_done, iter_flipped;
  logic [GW-1:0] grp;          // position inside a PC group

  // iteration control
  logic          ctl_start, iter_go, ctl_done;
  mode_e         mode;
  logic [N-1:0]  par_en;

  cmtdf_ctrl #(.MAX_ITER(MAX_ITER), .MAX_PHASE(MAX_PHASE)) u_ctrl (
    .clk, .rst_n, .start(ctl_start), .two_step,
    .iter_go, .iter_done, .iter_flipped,
    .mode, .par_en, .busy(), .done(ctl_done), .fb(ev_fb), .iter_count
  );

  function automatic logic [IW-1:0] wrap_add(logic [IW-1:0] i, int unsigned g);
    int unsigned t;
    t = int'(i) + g;
    return IW'((t >= K) ? t - K : t);
  endfunction

  function automatic logic [IW-1:0] wrap_sub(logic [IW-1:0] i, int unsigned g);
    int unsigned t;
    t = (int'(i) >= g) ? int'(i) - g : int'(i) + K - g;
    return IW'(t);
  endfunction

  // ---------------------------------------------------------------- INIT
  logic [N-1:0] init_s;
  mag_t         init_w [N];
  for (genvar p = 0; p < N; p++) begin : g_init
    soft_t y_u [NIN];
    always_comb begin
      for (int unsigned k = 0; k < M; k++)
        for (int unsigned a = 0; a < J_PER; a++)
          y_u[k*J_PER + a] = yu[wrap_sub(pos, TAP[k][p][a])][k];
    end
    syndrome_weight_unit #(.NIN(NIN)) u_swu (
      .y_v(yv[pos][p]), .y_u, .s(init_s[p]), .smag(), .wmin(init_w[p])
    );
  end

  // ---------------------------------------------------------------- CSEs
  logic [IW-1:0] cpos  [NC];       // position handled by each CSE
  logic [IW-1:0] cidx  [NC][J];    // syndrome index of each check
  logic [NC-1:0] cflip;
  chk_t          cl    [NC];
  logic [J-1:0]  en;

  always_comb begin
    for (int unsigned p = 0; p < N; p++)
      for (int unsigned a = 0; a < J_PER; a++)
        en[p*J_PER + a] = par_en[p];
  end

  for (genvar c = 0; c < NC; c++) begin : g_cse
    localparam int unsigned SET = c / NW;   // which set
    localparam int unsigned OFS = c % NW;   // place inside the set
    logic [J-1:0] syn_c;
    mag_t         w_c [J];
    logic         f, act;
    always_comb begin
      if (c == 0 && state != S_ITER) cpos[c] = pos;
      else                           cpos[c] = IW'(int'(pos) + SET * SEG + OFS);
      // the last step of a segment may be shorter than NW
      act = (int'(pos) + OFS < SEG);
      for (int unsigned p = 0; p < N; p++)
        for (int unsigned a = 0; a < J_PER; a++) begin
          logic [IW-1:0] ix;
          ix = wrap_add(cpos[c], TAP[kk][p][a]);
          cidx[c][p*J_PER + a] = ix;
          syn_c[p*J_PER + a]   = syn[ix][p];
          w_c[p*J_PER + a]     = (mode == MODE_WMTD) ? wmin[ix][p] : mag(yv[ix][p]);
        end
    end
    cse #(.J(J)) u_cse (
      .syn(syn_c), .w(w_c), .en, .d(dr[cpos[c]][kk]), .wd(mag(yu[cpos[c]][kk])),
      .l(cl[c]), .flip(f)
    );
    assign cflip[c] = running && act && f;
  end

  assign ev_flip = |cflip;

  // ---------------------------------------------------------------- PC
  logic          pc_in_valid, pc_fv;
  logic [GW-1:0] pc_off;
  logic [IW-1:0] pc_base;
  logic [KW-1:0] pc_k;
  chk_t          abs_l;

  assign abs_l       = cl[0][L_W-1] ? -cl[0] : cl[0];
  assign pc_in_valid = (state == S_PC);

  pc_decoder #(.NG(N1)) u_pcd (
    .clk, .rst_n, .clear(state != S_PC && state != S_PC_TAIL),
    .in_valid(pc_in_valid), .in_bit(hard(yu[pos][kk]) ^ dr[pos][kk]), .in_abs_l(abs_l),
    .flip_valid(pc_fv), .flip_off(pc_off)
  );
  assign ev_pc_flip = pc_fv;

  // ---------------------------------------------------------------- streams
  logic is_pc_col;
  assign is_pc_col = PC_EN && (grp == GW'(N1));
  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT) && !is_pc_col;
  always_comb begin
    for (int unsigned k = 0; k < M; k++) out_bits[k] = hard(yu[pos][k]) ^ dr[pos][k];
  end
  assign out_last  = out_valid && (pos == IW'(PC_EN ? K - 2 : K - 1));

  assign ev_pass_w = iter_go && (mode == MODE_WMTD);
  assign ev_pass_s = iter_go && (mode == MODE_SMTD);
  assign ev_masked = iter_go && !(&par_en);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      pos          <= '0;
      kk           <= '0;
      grp          <= '0;
      running      <= 1'b0;
      pass_flip    <= 1'b0;
      iter_done    <= 1'b0;
      iter_flipped <= 1'b0;
      ctl_start    <= 1'b0;
      pc_base      <= '0;
      pc_k         <= '0;
      pc_flips     <= '0;
    end else begin
      ctl_start <= 1'b0;
      iter_done <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          pos <= (pos == IW'(K - 1)) ? '0 : pos + 1'b1;
          if (pos == IW'(K - 1)) state <= S_INIT;
        end
        S_INIT: begin
          pos <= (pos == IW'(K - 1)) ? '0 : pos + 1'b1;
          if (pos == IW'(K - 1)) begin
            state     <= S_ITER;
            ctl_start <= 1'b1;
          end
        end
        S_ITER: begin
          if (iter_go) begin
            running   <= 1'b1;
            pass_flip <= 1'b0;
            pos       <= '0;
            kk        <= '0;
          end else if (running) begin
            if (|cflip) pass_flip <= 1'b1;
            if (kk == KW'(M - 1)) begin
              kk <= '0;
              if (pos == IW'(LASTSTEP)) begin
                running      <= 1'b0;
                iter_done    <= 1'b1;
                iter_flipped <= pass_flip | (|cflip);
              end else begin
                pos <= pos + IW'(NW);
              end
            end else begin
              kk <= kk + 1'b1;
            end
          end else if (ctl_done) begin
            pos      <= '0;
            kk       <= '0;
            grp      <= '0;
            pc_flips <= '0;
            state    <= PC_EN ? S_PC : S_OUT;
          end
        end
        S_PC: begin
          if (grp == GW'(GL - 1)) begin
            grp     <= '0;
            pc_base <= pos - IW'(GL - 1);
            pc_k    <= kk;
          end else begin
            grp <= grp + 1'b1;
          end
          if (pos == IW'(K - 1)) begin
            pos <= '0;
            if (kk == KW'(M - 1)) begin
              kk    <= '0;
              state <= S_PC_TAIL;
            end else begin
              kk <= kk + 1'b1;
            end
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_PC_TAIL: begin
          grp   <= '0;
          state <= S_OUT;
        end
        S_OUT: if (is_pc_col || out_ready) begin
          grp <= (PC_EN && grp == GW'(GL - 1)) ? '0 : grp + 1'b1;
          pos <= (pos == IW'(K - 1)) ? '0 : pos + 1'b1;
          if (pos == IW'(K - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
      if (pc_fv) pc_flips <= pc_flips + 1'b1;
    end
  end

  // ---------------------------------------------------------------- memories
  always_ff @(posedge clk) begin
    case (state)
      S_LOAD: if (in_valid) begin
        yu[pos] <= in_yu;
        yv[pos] <= in_yv;
      end
      S_INIT: begin
        syn[pos]  <= init_s;
        wmin[pos] <= init_w;
        dr[pos]   <= '0;
      end
      S_ITER: begin
        for (int unsigned c = 0; c < NC; c++) begin
          if (cflip[c]) begin
            dr[cpos[c]][kk] <= ~dr[cpos[c]][kk];
            for (int unsigned p = 0; p < N; p++)
              for (int unsigned a = 0; a < J_PER; a++)
                syn[cidx[c][p*J_PER + a]][p] <= ~syn[cidx[c][p*J_PER + a]][p];
          end
        end
      end
      default: ;
    endcase
    if (pc_fv) dr[pc_base + IW'(pc_off)][pc_k] <= ~dr[pc_base + IW'(pc_off)][pc_k];
  end

  // an offered output column stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_bits));
  // the schedule only starts a pass while no pass is running
  a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) iter_go |-> !running);
  // CSEs never flip the same bit position twice in one cycle
  a_one_flip: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ITER) |-> !(cflip[0] && cflip[NC-1] && cpos[0] == cpos[NC-1]));

  initial begin
    assert (K % NSET == 0) else $error("mtd_decoder: K must be a multiple of NSET");
    assert (NW >= 1 && NW <= MIN_TAP_SPACING) else $error("mtd_decoder: NW CSEs would share syndromes");
    assert (SEG > MAX_TAP + NW - 1) else $error("mtd_decoder: CSE set windows overlap");
    assert (!PC_EN || K % GL == 0) else $error("mtd_decoder: K must hold whole PC groups");
  end

endmodule
