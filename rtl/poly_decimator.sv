// poly_decimator: polyphase sinc^3 decimator by OSR.
//
// The same cascade of log2(OSR) factors (1 + z^-1)^3 with down-by-2 as the
// non-recursive decimator, but every stage is in polyphase form
// (poly_stage): the down-sampling comes first and the filter arithmetic runs
// at half the stage's input rate. This costs a few registers and a
// multiply-by-3 per stage more than the non-recursive stage and saves half
// the arithmetic activity. Stage i (1-based) widens the word from
// B + 3(i-1) to B + 3i bits; the output has W = B + 3*log2(OSR) bits.
//
// Interface and timing: one modulator bit x per cycle with in_valid high.
// Output m is the filtered value at input index m*OSR + OSR - 1, from the
// zero state at reset, and y_valid pulses log2(OSR) clocks after that input
// sample, as for the non-recursive decimator. The single clock with sample
// strobes and the reset are this design's choices.
module poly_decimator
  import decim_pkg::*;
#(
  parameter int unsigned OSR = OSR_DEFAULT,
  parameter int unsigned B   = B_DEFAULT,
  localparam int unsigned W  = out_width(B, 3, OSR)
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
    $error("poly_decimator: OSR must be a power of two of at least 2");
  end

  logic [W-1:0] data  [M+1];
  logic         valid [M+1];

  assign data[0]  = W'(x);
  assign valid[0] = in_valid;

  for (genvar i = 0; i < M; i++) begin : g_stage
    localparam int unsigned WI = B + 3 * i;
    logic [WI+2:0] so;
    poly_stage #(.WIN(WI)) u_stage (
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
