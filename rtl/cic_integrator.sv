// cic_integrator: the "IIR filter" (1/(1 - z^-1))^K of the IIR-FIR decimator.
//
// K accumulators in cascade, all W bits wide and wrapping modulo 2^W. The
// modulo wrap is harmless: the comb section that follows differences the
// values again, and the final result fits in W bits, so the overflow of an
// accumulator cancels out. W = b + k*log2(N) is the method's word length.
//
// Interface and timing: on a cycle with en high the input x is added into the
// first accumulator and each following accumulator adds the updated value of
// the one before it, so the chain adds combinationally within one clock.
// acc_next is the last accumulator's value including the current sample; it is
// what the down-sampler captures. The state only changes when en is high (the
// fs rate). Having no register between the accumulators keeps the section
// exactly (1/(1 - z^-1))^K with no added delay; that is this design's choice.
// Reset (active low, synchronous) clears all accumulators.
module cic_integrator #(
  parameter int unsigned K = 3,
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] acc_next
);

  logic [W-1:0] acc [K];    // accumulator registers
  logic [W-1:0] nxt [K];    // their values after this sample

  always_comb begin
    nxt[0] = acc[0] + x;
    for (int i = 1; i < K; i++) nxt[i] = acc[i] + nxt[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) acc[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < K; i++) acc[i] <= nxt[i];
    end
  end

  assign acc_next = nxt[K-1];

endmodule
