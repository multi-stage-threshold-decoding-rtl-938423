// pc_encoder: parity-check (PC) encoder placed in front of the convolutional
// encoder.
//
// Information arrives as columns of M bits, one bit of each information
// sequence, with a valid/ready handshake. After every N1 columns the encoder
// inserts one extra column holding, for each sequence, the even parity of the
// N1 bits just sent, so each group of N1+1 bits of a sequence XORs to 0. While
// it sends that parity column it holds in_ready low (one stall cycle per N1
// columns), which makes the rate N1/(N1+1) = 50/51.
// Timing: a column is passed through combinationally (out_* follow in_*);
// the parity column goes out in the cycle after the N1-th column is taken.
// N1 = 50 follows the published scheme; even parity is this design's choice.
module pc_encoder
  import mtd_pkg::*;
#(
  parameter int unsigned M  = M_INFO,
  parameter int unsigned NG = N1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] in_bits,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M-1:0] out_bits,
  output logic         out_is_pc    // the column on out_bits is a parity column
);

  logic [$clog2(NG+1)-1:0] cnt;     // data columns sent in the current group
  logic [M-1:0]            par;     // running parity of the current group
  logic                    pc_slot; // next column out is the parity column

  assign pc_slot   = (cnt == $bits(cnt)'(NG));
  assign in_ready  = out_ready && !pc_slot;
  assign out_valid = pc_slot || in_valid;
  assign out_bits  = pc_slot ? par : in_bits;
  assign out_is_pc = pc_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      par <= '0;
    end else if (out_ready) begin
      if (pc_slot) begin
        cnt <= '0;
        par <= '0;
      end else if (in_valid) begin
        cnt <= cnt + 1'b1;
        par <= par ^ in_bits;
      end
    end
  end

  // exactly one parity column follows every NG data columns
  a_count: assert property (@(posedge clk) disable iff (!rst_n) cnt <= $bits(cnt)'(NG));

endmodule
