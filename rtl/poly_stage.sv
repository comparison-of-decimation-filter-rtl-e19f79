// poly_stage: one stage of the polyphase decimator, the polyphase form of
// (1 + z^-1)^3 followed by a down-by-2.
//
// (1 + z^-1)^3 = H0(z^2) + z^-1 H1(z^2) with H0(z) = 1 + 3z^-1 and
// H1(z) = 3 + z^-1. The down-sampling moves to the input: the upper branch
// takes one sample of each pair, the lower branch (through a z^-1 hold
// register) the other, and each branch filter runs at half the input rate.
// Registers: the hold register, one delay in each branch filter, the phase
// bit and the output register. The factor 3 is a constant multiplication,
// left to synthesis to build from shifts and adds. This stage is for order
// k = 3 only.
//
// Interface and timing: in_valid marks an input sample on x (WIN bits). The
// first sample of each pair is held; on the second, with a = x[2m+1] and the
// held b = x[2m],
//   y[m] = (a[m] + 3 a[m-1]) + (3 b[m] + b[m-1])
//        = x[2m+1] + 3x[2m] + 3x[2m-1] + x[2m-2],
// which is loaded into y one clock later with a one-cycle y_valid, so the
// stage gives exactly the same samples as the non-recursive stage. Which
// sample of the pair feeds which branch and the synchronous active-low reset
// are this design's choices.
module poly_stage #(
  parameter int unsigned WIN = 1,
  localparam int unsigned WOUT = WIN + 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [WIN-1:0]  x,
  output logic [WOUT-1:0] y,
  output logic            y_valid
);

  logic [WIN-1:0]  hold;     // z^-1 then down-by-2: the lower-branch sample
  logic [WIN-1:0]  a_dly;    // H0 delay register
  logic [WIN-1:0]  b_dly;    // H1 delay register
  logic            odd;      // second sample of a pair is on x
  logic [WOUT-1:0] h0, h1;

  always_comb begin
    h0 = WOUT'(x)    + WOUT'(3) * WOUT'(a_dly);   // H0(z) = 1 + 3z^-1
    h1 = WOUT'(3) * WOUT'(hold) + WOUT'(b_dly);   // H1(z) = 3 + z^-1
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold    <= '0;
      a_dly   <= '0;
      b_dly   <= '0;
      odd     <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid && odd;
      if (in_valid) begin
        odd <= !odd;
        if (!odd) begin
          hold <= x;
        end else begin
          a_dly <= x;
          b_dly <= hold;
          y     <= h0 + h1;
        end
      end
    end
  end

  // A stage delivers at most every other cycle: its output strobe is never
  // high on two cycles in a row.
  a_out_rate: assert property (@(posedge clk) disable iff (!rst_n) y_valid |=> !y_valid);

endmodule
