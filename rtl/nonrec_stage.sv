// nonrec_stage: one stage of the non-recursive decimator, (1 + z^-1)^K
// followed by a down-by-2.
//
// The FIR is built as K first-order sections in cascade; each holds its
// previous input in one register and adds it to the current one, so a stage
// has K registers and K adders and the word grows by one bit per section
// (WIN in, WIN + K out). The FIR runs at the stage's input rate and the
// down-sampler then throws every other result away; that waste is what the
// polyphase stage avoids.
//
// Interface and timing: in_valid marks an input sample on x. A phase bit
// counts the pairs; the FIR result of the second sample of each pair is loaded
// into y one clock later, with a one-cycle y_valid. The output therefore comes
// at half the input rate and y[m] = x[2m+1] + K..binomial.. + x[2m+1-K]
// (for K = 3: x[2m+1] + 3x[2m] + 3x[2m-1] + x[2m-2]). Keeping the second
// sample of each pair, the cascade of sections and the synchronous
// active-low reset are this design's choices.
module nonrec_stage #(
  parameter int unsigned K   = 3,
  parameter int unsigned WIN = 1,
  localparam int unsigned WOUT = WIN + K
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [WIN-1:0]  x,
  output logic [WOUT-1:0] y,
  output logic            y_valid
);

  // s[i] is the output of section i (s[0] is the input); all are held at the
  // full output width, section i only ever needs WIN + i bits of it.
  logic [WOUT-1:0] s   [K+1];
  logic [WOUT-1:0] dly [K];
  logic            odd;

  always_comb begin
    s[0] = WOUT'(x);
    for (int i = 0; i < K; i++) s[i+1] = s[i] + dly[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) dly[i] <= '0;
      odd     <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid && odd;
      if (in_valid) begin
        for (int i = 0; i < K; i++) dly[i] <= s[i];
        odd <= !odd;
        if (odd) y <= s[K];
      end
    end
  end

  // A stage delivers at most every other cycle: its output strobe is never
  // high on two cycles in a row.
  a_out_rate: assert property (@(posedge clk) disable iff (!rst_n) y_valid |=> !y_valid);

endmodule
