// pc_decoder: parity-check (PC) decoding after the last MTD iteration.
//
// The decoder streams the decoded bits of one information sequence through
// this unit, one per cycle, together with the magnitude of the checksum the
// checksum-threshold element computes for that bit. Groups are NG+1 bits long
// (NG information bits and their parity bit). The unit keeps the running
// parity and the position of the smallest |checksum| in the group, i.e. the
// least reliable decision. At the last bit of a group it reports, in the next
// cycle, flip_valid = 1 with flip_off (position inside the group) when the
// group's parity is odd; the caller then inverts that bit. Ties keep the
// earlier bit. The first group starts after reset or clear.
// The rule follows the published PC decoding; the tie rule is this design's.
module pc_decoder
  import mtd_pkg::*;
#(
  parameter int unsigned NG = N1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,     // restart at a group boundary
  input  logic                      in_valid,
  input  logic                      in_bit,    // decoded bit
  input  chk_t                      in_abs_l,  // |checksum| of that bit
  output logic                      flip_valid,
  output logic [$clog2(NG+1)-1:0]   flip_off
);

  localparam int unsigned OW = $clog2(NG + 1);

  logic [OW-1:0] pos, best_pos;
  chk_t          best_l;
  logic          par;

  // parity and least reliable bit including the incoming bit
  logic          p_new;
  logic [OW-1:0] b_pos;
  chk_t          b_l;
  always_comb begin
    p_new = par ^ in_bit;
    if (pos == '0 || in_abs_l < best_l) begin
      b_pos = pos;
      b_l   = in_abs_l;
    end else begin
      b_pos = best_pos;
      b_l   = best_l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      best_pos   <= '0;
      best_l     <= '0;
      par        <= 1'b0;
      flip_valid <= 1'b0;
      flip_off   <= '0;
    end else begin
      flip_valid <= 1'b0;
      if (clear) begin
        pos <= '0;
        par <= 1'b0;
      end else if (in_valid) begin
        if (pos == OW'(NG)) begin
          flip_valid <= p_new;
          flip_off   <= b_pos;
          pos        <= '0;
          par        <= 1'b0;
        end else begin
          pos      <= pos + 1'b1;
          par      <= p_new;
          best_pos <= b_pos;
          best_l   <= b_l;
        end
      end
    end
  end

endmodule
