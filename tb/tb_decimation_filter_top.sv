// tb_decimation_filter_top: end-to-end test of the three decimators at their
// default size (N = 256, k = 3, 25-bit outputs), driven by a behavioural
// second-order sigma-delta modulator.
//
// The modulator input u runs through a slow sine (amplitude 0.5, 64 output
// samples per period); then the modulator is bypassed for a full-scale
// stretch of ones and a stretch of zeros; then a second sine runs with idle cycles (x_valid low) between samples. For each
// architecture the test checks every output word against the sinc^3
// convolution from sinc_ref_pkg at input index m*N + N - 1, the strobe
// latency (1 clock for IIR-FIR, log2 N = 8 for the two cascades), and that
// the three outputs agree word for word. For the sine parts it also checks
// that y / N^3 follows (u' + 1) / 2 to within 0.01 of full scale, where u' is
// the modulator input u filtered by the same sinc^3 weights: the output
// carries the analog signal and only a little shaped quantisation noise.
//
// Mechanisms counted, each required at least once: a decimated output from
// each architecture, a wrap-around of the last IIR integrator (modulo
// arithmetic that the comb section undoes), a full-scale output N^3 (the
// word length is exactly enough for it), a zero output and an idle input
// cycle.
module tb_decimation_filter_top;
  import sinc_ref_pkg::*;
  localparam int unsigned N  = 256;
  localparam int unsigned K  = 3;
  localparam int unsigned W  = 1 + K * $clog2(N);
  localparam int unsigned NA = 3;              // architectures
  localparam real         PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x, mod_bit;
  logic force_en = 0, force_val = 0;   // bypass the modulator with a constant bit
  real  u = 0.0;
  logic [W-1:0] y [NA];
  logic         yv [NA];
  int lat [NA] = '{1, $clog2(N), $clog2(N)};
  string arch [NA] = '{"iir-fir", "non-recursive", "polyphase"};

  int checks = 0, failures = 0, idle_cycles = 0, wraps = 0, full_scale = 0, zero_out = 0;
  int outputs [NA] = '{0, 0, 0};
  int track_checks = 0;
  longint cyc = 0;
  longint xs[$];
  longint exp_val[$];
  longint exp_edge[$];
  real    exp_u[$];        // filtered modulator input, or -9 if not all from a sine part
  real    us[$];           // modulator input of every sample
  bit     sf[$];           // sample belongs to a sine part
  bit     sine_part = 0;
  longint last_acc = 0;
  sinc_ref ref_model;

  sdm2_model u_mod (.clk, .rst_n, .en(x_valid && !force_en), .u, .y(mod_bit));
  assign x = force_en ? force_val : mod_bit;

  decimation_filter_top dut (
    .clk, .rst_n, .x_valid, .x,
    .y_iirfir (y[0]), .y_iirfir_valid (yv[0]),
    .y_nonrec (y[1]), .y_nonrec_valid (yv[1]),
    .y_poly   (y[2]), .y_poly_valid   (yv[2])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integrator wrap-around: the last accumulator value decreases.
  always @(posedge clk) begin
    longint a;
    a = longint'(dut.u_iirfir.u_int.acc[K-1]);
    if (rst_n && a < last_acc) wraps++;
    last_acc <= a;
  end

  // One monitor per architecture; outputs are compared in the order they come.
  for (genvar g = 0; g < NA; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && yv[g]) begin
        int m;
        m = outputs[g];
        outputs[g]++;
        checks += 2;
        if (m >= exp_val.size()) begin
          failures += 2;
          $display("%s: unexpected output %0d", arch[g], y[g]);
        end else begin
          if (longint'(y[g]) != exp_val[m]) begin
            failures++;
            if (failures < 10) $display("%s output %0d: y=%0d expected=%0d", arch[g], m, y[g], exp_val[m]);
          end
          if (cyc + 1 - exp_edge[m] != lat[g]) begin
            failures++;
            if (failures < 10) $display("%s output %0d: latency %0d expected %0d", arch[g], m, cyc + 1 - exp_edge[m], lat[g]);
          end
          if (g == 0) begin
            if (longint'(y[g]) == (longint'(1) << (K * $clog2(N)))) full_scale++;
            if (y[g] == '0) zero_out++;
            if (exp_u[m] > -2.0) begin
              real got, want;
              got  = real'(y[g]) / real'(longint'(1) << (K * $clog2(N)));
              want = (exp_u[m] + 1.0) / 2.0;
              checks++;
              track_checks++;
              if (got - want > 0.01 || want - got > 0.01) begin
                failures++;
                if (failures < 10) $display("output %0d: %f does not track input %f", m, got, want);
              end
            end
          end
          if (g == NA - 1) begin
            checks++;
            if (y[0] != y[1] || y[1] != y[2]) begin
              failures++;
              $display("architectures disagree at output %0d", m);
            end
          end
        end
      end
    end
  end

  // One input sample to the filters; in_u is the modulator input for the
  // next step. The block's mean of u is kept for the tracking check.
  task automatic send(input real in_u, input int forced = -1);
    @(posedge clk);
    #1;
    x_valid   = 1;
    force_en  = (forced >= 0);
    force_val = (forced == 1);
    xs.push_back(force_en ? longint'(force_val) : longint'(mod_bit));
    us.push_back(u);
    sf.push_back(sine_part && !force_en);
    u = in_u;
    if (xs.size() % N == 0) begin
      int  last;
      real acc;
      bit  all_sine;
      last = xs.size() - 1;
      exp_val.push_back(ref_model.at(xs, last));
      exp_edge.push_back(cyc + 1);
      // the same sinc^3 weights applied to the analog input
      acc = 0.0;
      all_sine = 1;
      for (int j = 0; j < ref_model.len; j++) begin
        if (last - j < 0) all_sine = 0;
        else begin
          acc += real'(ref_model.h[j]) * us[last - j];
          if (!sf[last - j]) all_sine = 0;
        end
      end
      exp_u.push_back(all_sine ? acc / real'(longint'(1) << (K * $clog2(N))) : -9.0);
    end
  endtask

  task automatic idle();
    @(posedge clk);
    #1;
    x_valid = 0;
    idle_cycles++;
  endtask

  initial begin
    ref_model = new(N, K);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // slow sine, 64 outputs per period
    sine_part = 1;
    for (int i = 0; i < 64 * N; i++) send(0.5 * $sin(2.0 * PI * i / (64.0 * N)));
    // full scale, then zero input
    sine_part = 0;
    for (int i = 0; i < 6 * N; i++) send(0.0, 1);
    for (int i = 0; i < 6 * N; i++) send(0.0, 0);
    // sine with idle cycles between samples
    sine_part = 1;
    for (int i = 0; i < 32 * N; i++) begin
      if ($urandom_range(0, 4) == 0) idle();
      send(0.4 * $sin(2.0 * PI * i / (32.0 * N)));
    end
    repeat (20) idle();
    for (int g = 0; g < NA; g++) begin
      checks++;
      if (outputs[g] != exp_val.size() || outputs[g] == 0) begin
        failures++;
        $display("%s: %0d outputs, %0d expected", arch[g], outputs[g], exp_val.size());
      end
    end
    checks++; if (wraps == 0)        begin failures++; $display("no integrator wrap-around"); end
    checks++; if (full_scale == 0)   begin failures++; $display("no full-scale output"); end
    checks++; if (zero_out == 0)     begin failures++; $display("no zero output"); end
    checks++; if (idle_cycles == 0)  begin failures++; $display("no idle input cycle"); end
    checks++; if (track_checks == 0) begin failures++; $display("no tracking check made"); end
    $display("outputs iir-fir=%0d non-recursive=%0d polyphase=%0d", outputs[0], outputs[1], outputs[2]);
    $display("integrator wraps=%0d full-scale=%0d zero=%0d idle cycles=%0d tracking checks=%0d",
             wraps, full_scale, zero_out, idle_cycles, track_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
