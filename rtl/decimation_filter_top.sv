// decimation_filter_top: the three sinc^3 decimator architectures side by side.
//
// One 1-bit sigma-delta modulator stream (x, strobed by x_valid at the
// modulator rate fs) feeds three decimators that compute the same comb
// response ((1 - z^-N)/(1 - z^-1))^K and decimate by N = OSR:
//   - iir_fir_decimator: K integrators at fs, down-by-N, K differentiators at
//     fs/N (smallest);
//   - nonrec_decimator:  log2(N) stages of (1 + z^-1)^K and down-by-2;
//   - poly_decimator:    the same stages in polyphase form, down-by-2 first
//     (lowest switching activity).
// All three start from the zero state at reset and use the same decimation
// phase, so their outputs are identical word for word; they differ in
// latency: the IIR-FIR output comes 1 clock after the last input sample of a
// block, the other two log2(N) clocks after it. Every output is
// B + K*log2(N) = 25 bits for the default N = 256 and is unsigned: the 1-bit
// input is read as 0/1 and full scale is N^K.
//
// The modulator itself is an analog part outside this design; its bit stream
// enters on x. Placing the three filters side by side, the clock-enable
// style and the reset are this design's choices. The polyphase form exists
// for K = 3 only, so K is fixed for it.
module decimation_filter_top
  import decim_pkg::*;
#(
  parameter int unsigned OSR = OSR_DEFAULT,
  parameter int unsigned K   = K_DEFAULT,
  localparam int unsigned W  = out_width(B_DEFAULT, K, OSR),
  localparam int unsigned WP = out_width(B_DEFAULT, 3, OSR)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  input  logic          x,
  output logic [W-1:0]  y_iirfir,
  output logic          y_iirfir_valid,
  output logic [W-1:0]  y_nonrec,
  output logic          y_nonrec_valid,
  output logic [WP-1:0] y_poly,
  output logic          y_poly_valid
);

  iir_fir_decimator #(.OSR(OSR), .K(K), .B(1)) u_iirfir (
    .clk, .rst_n,
    .in_valid (x_valid),
    .x        (x),
    .y        (y_iirfir),
    .y_valid  (y_iirfir_valid)
  );

  nonrec_decimator #(.OSR(OSR), .K(K), .B(1)) u_nonrec (
    .clk, .rst_n,
    .in_valid (x_valid),
    .x        (x),
    .y        (y_nonrec),
    .y_valid  (y_nonrec_valid)
  );

  poly_decimator #(.OSR(OSR), .B(1)) u_poly (
    .clk, .rst_n,
    .in_valid (x_valid),
    .x        (x),
    .y        (y_poly),
    .y_valid  (y_poly_valid)
  );

endmodule
