// cic_comb: the "FIR filter" (1 - z^-1)^K of the IIR-FIR decimator.
//
// K differentiators in cascade, working on the decimated samples (rate
// fs/N). Each keeps the previous value of its input in one register and
// subtracts it, modulo 2^W. Together with the K integrators in front of the
// down-sampler this gives the comb response ((1 - z^-N)/(1 - z^-1))^K.
//
// Interface and timing: in_valid marks a decimated sample on x. The K
// differences are formed combinationally and the result is registered, so y
// and y_valid appear one clock after in_valid; y holds until the next sample.
// Reset (active low, synchronous) clears the delay registers and the output.
module cic_comb #(
  parameter int unsigned K = 3,
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         y_valid
);

  logic [W-1:0] dly [K];    // previous input of each differentiator
  logic [W-1:0] d   [K+1];  // d[0] = input, d[i] = output of differentiator i

  always_comb begin
    d[0] = x;
    for (int i = 0; i < K; i++) d[i+1] = d[i] - dly[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) dly[i] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < K; i++) dly[i] <= d[i];
        y <= d[K];
      end
    end
  end

endmodule
