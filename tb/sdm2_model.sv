// sdm2_model: behavioural model of a second-order sigma-delta modulator
// (testbench only, not synthesizable: it uses real arithmetic).
//
// Two discrete-time integrators in the classic feedback structure
//   v1 += u - d;  v2 += v1 - d;  bit = (v2 >= 0);  d = bit ? +1 : -1
// turn an analog input u in (-1, 1) into a 1-bit stream whose average is
// (u + 1) / 2 and whose quantisation noise is shaped by (1 - z^-1)^2. Each
// clock with en high produces one new bit on y (the modulator rate fs).
module sdm2_model (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  real  u,
  output logic y
);
  real v1, v2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 0.0;
      v2 <= 0.0;
      y  <= 1'b0;
    end else if (en) begin
      real d, n1, n2;
      d  = y ? 1.0 : -1.0;
      n1 = v1 + u - d;
      n2 = v2 + n1 - d;
      v1 <= n1;
      v2 <= n2;
      y  <= (n2 >= 0.0);
    end
  end
endmodule
