// ape_comm_net: the inter-APE communications network of one substring.
//
// The network does not move data words; it moves activity signals (M-tag
// patterns) along the string. Every APE whose M flag is set launches a
// signal towards LKR (net_left=0) or towards LKL (net_left=1). The signal
// passes APE after APE and is delivered to the first APE it reaches whose
// gate is open, where it stops:
//   net_gated = 0 : every gate is open, so each M tag lands on the
//                   immediate neighbour (a one-APE shift of the M pattern);
//   net_gated = 1 : only APEs with A set are gates, so each matching APE
//                   signals the next selected APE however far away it is,
//                   passing over unselected APEs.
// An APE that is itself M-tagged launches its own signal even when one
// arrives, so several transfers proceed in parallel along the string.
// LKL and LKR stand for the left neighbour of the leftmost APE and the right
// neighbour of the rightmost one: a signal arriving on lkl_in (rightward) or
// lkr_in (leftward) enters the string, and one leaving the end appears on
// lkr_out or lkl_out, so substrings chain into longer strings by wiring one
// substring's LKR to the next one's LKL. The output of the port that points
// against the transfer direction is 0.
//
// Purely combinational, a ripple chain like a carry chain: the result is
// sampled into the D flags at the end of the step. Transfer of M tags via
// LKL/LKR to neighbours or selected remote APEs follows the source; the
// gate-by-A rule for remote transfers is this design's reading of it.
module ape_comm_net #(
  parameter int unsigned N = 64
) (
  input  logic         net_left,
  input  logic         net_gated,
  input  logic [N-1:0] m,
  input  logic [N-1:0] a,
  input  logic         lkl_in,
  input  logic         lkr_in,
  output logic [N-1:0] d,
  output logic         lkl_out,
  output logic         lkr_out
);
  logic [N-1:0] gate;
  logic [N:0]   rc;  // rc[i]: signal arriving at APE i from the left
  logic [N:0]   lc;  // lc[i+1]: signal arriving at APE i from the right

  assign gate  = net_gated ? a : '1;
  assign rc[0] = lkl_in & ~net_left;
  assign lc[N] = lkr_in & net_left;

  for (genvar i = 0; i < N; i++) begin : g_link
    assign rc[i+1] = m[i] | (rc[i] & ~gate[i]);
    assign lc[i]   = m[i] | (lc[i+1] & ~gate[i]);
    assign d[i]    = gate[i] & (net_left ? lc[i+1] : rc[i]);
  end

  assign lkr_out = ~net_left & rc[N];
  assign lkl_out =  net_left & lc[0];
endmodule
