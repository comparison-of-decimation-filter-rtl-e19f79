// tb_nonrec_decimator: self-checking test of the non-recursive decimator at its
// default size (N = 256, k = 3, 25-bit output).
//
// The 1-bit input runs through random bits, a full-scale stretch of ones, a
// stretch of zeros and random bits with idle (in_valid low) cycles between
// samples. Each output is compared with the sinc^3 convolution sum computed
// from the impulse response in sinc_ref_pkg, evaluated at input index
// m*N + N - 1, and its strobe must come LAT clocks after that input sample.
// The test also counts full-scale outputs (N^3, the largest value the
// 25-bit word must hold) and requires at least one.
module tb_nonrec_decimator;
  import sinc_ref_pkg::*;
  localparam int unsigned N   = 256;
  localparam int unsigned K   = 3;
  localparam int unsigned W   = 1 + K * $clog2(N);
  localparam int unsigned LAT = $clog2(N);

  logic clk = 0, rst_n = 0, in_valid = 0, x = 0;
  logic [W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, outputs = 0, full_scale = 0, gaps = 0;
  longint cyc = 0;
  longint xs[$];
  longint exp_val[$];
  longint exp_edge[$];
  sinc_ref ref_model;

  nonrec_decimator dut (.clk, .rst_n, .in_valid, .x, .y, .y_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: value and latency of every strobe.
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      outputs++;
      checks += 2;
      if (exp_val.size() == 0) begin
        failures += 2;
        $display("unexpected output %0d at edge %0d", y, cyc + 1);
      end else begin
        longint v, e;
        v = exp_val.pop_front();
        e = exp_edge.pop_front();
        if (longint'(y) != v) begin
          failures++;
          if (failures < 10) $display("output %0d: y=%0d expected=%0d", outputs, y, v);
        end
        if (cyc + 1 - e != LAT) begin
          failures++;
          if (failures < 10) $display("output %0d: latency %0d expected %0d", outputs, cyc + 1 - e, LAT);
        end
        if (longint'(y) == (longint'(1) << (K * $clog2(N)))) full_scale++;
      end
    end
  end

  task automatic send(input bit b);
    @(posedge clk);
    #1;
    in_valid = 1;
    x = b;
    xs.push_back(longint'(b));
    if (xs.size() % N == 0) begin
      exp_val.push_back(ref_model.at(xs, xs.size() - 1));
      exp_edge.push_back(cyc + 1);
    end
  endtask

  task automatic idle();
    @(posedge clk);
    #1;
    in_valid = 0;
    x = 1'($urandom);
    gaps++;
  endtask

  initial begin
    ref_model = new(N, K);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 10 * N; i++) send(1'($urandom));
    for (int i = 0; i < 6 * N; i++)  send(1'b1);
    for (int i = 0; i < 5 * N; i++)  send(1'b0);
    for (int i = 0; i < 8 * N; i++) begin
      if ($urandom_range(0, 3) == 0) idle();
      send(($urandom_range(0, 3) != 0));
    end
    idle();
    repeat (20) idle();
    checks++;
    if (exp_val.size() != 0 || outputs != 29) begin
      failures++;
      $display("outputs: %0d, %0d still expected", outputs, exp_val.size());
    end
    checks++;
    if (full_scale == 0) begin
      failures++;
      $display("no full-scale output seen");
    end
    $display("outputs=%0d full_scale=%0d idle_cycles=%0d", outputs, full_scale, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
