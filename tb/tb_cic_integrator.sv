// tb_cic_integrator: self-checking test of the K-integrator cascade.
//
// Drives random W-bit words with a random enable and compares acc_next on
// every enabled cycle with K running sums kept in the testbench (modulo 2^W).
// A small W is used so that the accumulators wrap many times. Also checks
// that a disabled cycle leaves the state unchanged.
module tb_cic_integrator;
  localparam int unsigned K = 3;
  localparam int unsigned W = 10;

  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] x = '0, acc_next;
  int checks = 0, failures = 0, wraps = 0;
  longint s [K];
  longint mask = (64'd1 << W) - 1;

  cic_integrator #(.K(K), .W(W)) dut (.clk, .rst_n, .en, .x, .acc_next);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prev;
    foreach (s[i]) s[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      en <= ($urandom_range(0, 3) != 0);
      x  <= W'($urandom);
      #1;
      if (en) begin
        s[0] = (s[0] + longint'(x)) & mask;
        for (int i = 1; i < K; i++) s[i] = (s[i] + s[i-1]) & mask;
        checks++;
        if (longint'(acc_next) != s[K-1]) begin
          failures++;
          if (failures < 10) $display("n=%0d acc_next=%0d expected=%0d", n, acc_next, s[K-1]);
        end
        if (s[K-1] < prev) wraps++;
        prev = s[K-1];
      end
      @(posedge clk);
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("the last accumulator never wrapped");
    end
    $display("accumulator wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
