// tb_osr_sweep: the three decimators built for the other two oversampling
// ratios of the method, N = 64 (19-bit output) and N = 128 (22-bit output).
//
// Two instances of decimation_filter_top, one per ratio, share one random
// 1-bit input stream with a full-scale stretch of ones in the middle. For
// each instance and architecture every output word is compared with the
// sinc^3 convolution from sinc_ref_pkg at input index m*N + N - 1, and the
// three architectures must agree. A full-scale output (N^3) must appear at
// each ratio.
module tb_osr_sweep;
  import sinc_ref_pkg::*;

  logic clk = 0, rst_n = 0, x_valid = 0, x = 0;
  logic [18:0] a0, a1, a2;   // N = 64
  logic [21:0] b0, b1, b2;   // N = 128
  logic av0, av1, av2, bv0, bv1, bv2;
  int checks = 0, failures = 0, fs64 = 0, fs128 = 0, n64 = 0, n128 = 0;
  longint xs[$];
  sinc_ref r64, r128;

  decimation_filter_top #(.OSR(64)) dut64 (
    .clk, .rst_n, .x_valid, .x,
    .y_iirfir (a0), .y_iirfir_valid (av0),
    .y_nonrec (a1), .y_nonrec_valid (av1),
    .y_poly   (a2), .y_poly_valid   (av2)
  );

  decimation_filter_top #(.OSR(128)) dut128 (
    .clk, .rst_n, .x_valid, .x,
    .y_iirfir (b0), .y_iirfir_valid (bv0),
    .y_nonrec (b1), .y_nonrec_valid (bv1),
    .y_poly   (b2), .y_poly_valid   (bv2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected words per ratio, and how many outputs each architecture gave.
  longint e64[$], e128[$];
  int i64 [3] = '{0, 0, 0};
  int i128[3] = '{0, 0, 0};

  // Compares one output with the expected word of the given index; returns
  // 1 on a mismatch or an output that was not expected.
  function automatic bit bad(input string tag, input longint got, input longint e[$], input int idx);
    if (idx >= e.size()) begin
      $display("%s: unexpected output", tag);
      return 1;
    end
    if (got != e[idx]) begin
      $display("%s output %0d: %0d expected %0d", tag, idx, got, e[idx]);
      return 1;
    end
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (av0) begin checks++; failures += bad("N=64 iir-fir", longint'(a0), e64, i64[0]); i64[0]++; n64++; if (a0 == 19'(1 << 18)) fs64++; end
    if (av1) begin checks++; failures += bad("N=64 non-recursive", longint'(a1), e64, i64[1]); i64[1]++; end
    if (av2) begin checks++; failures += bad("N=64 polyphase", longint'(a2), e64, i64[2]); i64[2]++; end
    if (bv0) begin checks++; failures += bad("N=128 iir-fir", longint'(b0), e128, i128[0]); i128[0]++; n128++; if (b0 == 22'(1 << 21)) fs128++; end
    if (bv1) begin checks++; failures += bad("N=128 non-recursive", longint'(b1), e128, i128[1]); i128[1]++; end
    if (bv2) begin checks++; failures += bad("N=128 polyphase", longint'(b2), e128, i128[2]); i128[2]++; end
  end

  task automatic send(input bit b);
    @(posedge clk);
    #1;
    x_valid = 1;
    x = b;
    xs.push_back(longint'(b));
    if (xs.size() % 64 == 0)  e64.push_back(r64.at(xs, xs.size() - 1));
    if (xs.size() % 128 == 0) e128.push_back(r128.at(xs, xs.size() - 1));
  endtask

  initial begin
    r64  = new(64, 3);
    r128 = new(128, 3);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 16 * 128; i++) send(1'($urandom));
    for (int i = 0; i < 4 * 128; i++)  send(1'b1);
    for (int i = 0; i < 8 * 128; i++)  begin
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1 x_valid = 0; end
      send(1'($urandom));
    end
    repeat (20) begin @(posedge clk); #1 x_valid = 0; end
    for (int g = 0; g < 3; g++) begin
      checks += 2;
      if (i64[g] != e64.size())   begin failures++; $display("N=64: %0d of %0d outputs", i64[g], e64.size()); end
      if (i128[g] != e128.size()) begin failures++; $display("N=128: %0d of %0d outputs", i128[g], e128.size()); end
    end
    checks += 2;
    if (fs64 == 0)  begin failures++; $display("no full-scale output at N=64"); end
    if (fs128 == 0) begin failures++; $display("no full-scale output at N=128"); end
    $display("outputs N=64: %0d, N=128: %0d; full-scale N=64: %0d, N=128: %0d", n64, n128, fs64, fs128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
