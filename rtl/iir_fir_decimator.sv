// iir_fir_decimator: recursive (IIR-FIR) sinc^K decimator by OSR.
//
// The comb response ((1 - z^-N)/(1 - z^-1))^K is split into K integrators
// running at the modulator rate fs, a down-by-N sampler, and K
// differentiators running at fs/N. Only the integrators work at the high
// rate, and a block has one adder and one register per order, which is what
// makes this structure the smallest of the three. Every word is
// W = B + K*log2(OSR) bits wide, the word length that avoids overflow.
//
// Interface and timing: one modulator bit x per cycle with in_valid high
// (in_valid may also be held low on some cycles; only the valid cycles count
// as samples). A log2(OSR)-bit counter picks the last sample of every block of
// OSR; that sample's integrator value goes to the comb, and y/y_valid follow
// one clock later. Output m is therefore the filtered value at input index
// m*OSR + OSR - 1, with the filter starting from the zero state at reset.
// The single clock with sample strobes, the phase of the down-sampler and the
// synchronous active-low reset are this design's choices.
module iir_fir_decimator
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

  localparam int unsigned CW = (OSR > 1) ? $clog2(OSR) : 1;

  if (OSR < 2 || (1 << $clog2(OSR)) != OSR) begin : g_osr_check
    $error("iir_fir_decimator: OSR must be a power of two of at least 2");
  end

  logic [W-1:0]  int_out;
  logic [CW-1:0] phase;
  logic          last;

  cic_integrator #(.K(K), .W(W)) u_int (
    .clk, .rst_n,
    .en       (in_valid),
    .x        (W'(x)),
    .acc_next (int_out)
  );

  // Down-by-OSR: count samples, pass on the last one of each block.
  assign last = in_valid && (phase == CW'(OSR - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)        phase <= '0;
    else if (in_valid) phase <= phase + 1'b1;
  end

  cic_comb #(.K(K), .W(W)) u_comb (
    .clk, .rst_n,
    .in_valid (last),
    .x        (int_out),
    .y,
    .y_valid
  );

endmodule
