// tb_poly_stage: self-checking test of one polyphase stage.
//
// Random 4-bit input words arrive on random valid cycles. For every second
// valid sample n (n = 1, 3, 5, ...) the stage must deliver
// x[n] + 3x[n-1] + 3x[n-2] + x[n-3] exactly one clock after that sample, and
// nothing on other cycles. The expected values come from the binomial
// coefficients of (1 + z^-1)^3, not from the H0/H1 branch split.
module tb_poly_stage;
  localparam int unsigned WIN  = 4;
  localparam int unsigned WOUT = WIN + 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [WIN-1:0]  x = '0;
  logic [WOUT-1:0] y;
  logic            y_valid;
  int checks = 0, failures = 0, outputs = 0;
  longint hist[$];
  bit     expect_valid = 0;
  longint expect_y = 0;
  longint c[4] = '{1, 3, 3, 1};

  poly_stage #(.WIN(WIN)) dut (.clk, .rst_n, .in_valid, .x, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (y_valid !== expect_valid) begin
        failures++;
        if (failures < 10) $display("n=%0d y_valid=%0b expected %0b", n, y_valid, expect_valid);
      end
      if (expect_valid) begin
        outputs++;
        checks++;
        if (longint'(y) != expect_y) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d expected=%0d", n, y, expect_y);
        end
      end
      in_valid = (n < 2000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      x        = (n >= 1000 && n < 1100) ? '1 : WIN'($urandom);
      expect_valid = 0;
      if (in_valid) begin
        hist.push_front(longint'(x));
        if (hist.size() % 2 == 0) begin
          longint acc;
          acc = 0;
          for (int j = 0; j < 4; j++) if (j < hist.size()) acc += c[j] * hist[j];
          expect_valid = 1;
          expect_y = acc;
        end
      end
    end
    checks++;
    if (outputs < 1000) begin
      failures++;
      $display("too few outputs: %0d", outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
