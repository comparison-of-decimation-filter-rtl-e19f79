// nonrec_decimator: non-recursive sinc^K decimator by OSR.
//
// Uses the factorisation ((1 - z^-N)/(1 - z^-1))^K =
// prod_{i=0}^{log2 N - 1} (1 + z^-(2^i))^K: log2(OSR) identical stages, each a
// (1 + z^-1)^K FIR followed by a down-by-2 (nonrec_stage). There is no
// feedback anywhere, so no register can overflow or grow without bound.
// Stage i (1-based) runs at fs/2^(i-1) and widens the word from B + K*(i-1)
// to B + K*i bits; the last stage runs at fs/2^(log2 N - 1) and delivers
// W = B + K*log2(OSR) bits at fs/N.
//
// Interface and timing: one modulator bit x per cycle with in_valid high.
// Output m is the filtered value at input index m*OSR + OSR - 1, from the
// zero state at reset, and y_valid pulses log2(OSR) clocks after that input
// sample (one registered output per stage). The single clock with sample
// strobes and the reset are this design's choices.
module nonrec_decimator
  import decim_pkg::*;
#(
  parameter int unsigned OSR = OSR_DEFAULT,
  parameter int unsigned K   = K_DEFAULT,
  parameter int unsigned B   = B_DEFAULT,
  localparam int unsigned W  = out_width(B, K, OSR)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [B-1:0] x,
  output logic [W-1:0] y,
  output logic         y_valid
);

  localparam int unsigned M = $clog2(OSR);   // number of stages

  if (OSR < 2 || (1 << M) != OSR) begin : g_osr_check
    $error("nonrec_decimator: OSR must be a power of two of at least 2");
  end

  // Stage i's output bus; each carries the full width W, of which stage i
  // drives the low B + K*(i+1) bits.
  logic [W-1:0] data  [M+1];
  logic         valid [M+1];

  assign data[0]  = W'(x);
  assign valid[0] = in_valid;

  for (genvar i = 0; i < M; i++) begin : g_stage
    localparam int unsigned WI = B + K * i;
    logic [WI+K-1:0] so;
    nonrec_stage #(.K(K), .WIN(WI)) u_stage (
      .clk, .rst_n,
      .in_valid (valid[i]),
      .x        (data[i][WI-1:0]),
      .y        (so),
      .y_valid  (valid[i+1])
    );
    assign data[i+1] = W'(so);
  end

  assign y       = data[M];
  assign y_valid = valid[M];

endmodule
