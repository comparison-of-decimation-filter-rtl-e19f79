// tb_cic_comb: self-checking test of the K-differentiator cascade.
//
// Feeds random W-bit words on random valid cycles and checks that y_valid
// comes exactly one clock after in_valid and that y equals the K-th backward
// difference of the inputs (modulo 2^W), computed here from the binomial
// coefficients of (1 - z^-1)^K.
module tb_cic_comb;
  localparam int unsigned K = 3;
  localparam int unsigned W = 12;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] x = '0, y;
  logic y_valid;
  int checks = 0, failures = 0;
  longint hist[$];
  longint mask = (64'd1 << W) - 1;
  longint c[4] = '{1, -3, 3, -1};
  bit     expect_valid = 0;
  longint expect_y = 0;

  cic_comb #(.K(K), .W(W)) dut (.clk, .rst_n, .in_valid, .x, .y, .y_valid);

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
      // check what the previous cycle's input produced
      checks++;
      if (y_valid !== expect_valid) begin
        failures++;
        if (failures < 10) $display("n=%0d y_valid=%0b expected %0b", n, y_valid, expect_valid);
      end
      if (expect_valid) begin
        checks++;
        if (longint'(y) != expect_y) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d expected=%0d", n, y, expect_y);
        end
      end
      in_valid = ($urandom_range(0, 2) == 0);
      x        = W'($urandom);
      expect_valid = in_valid;
      if (in_valid) begin
        longint acc;
        acc = 0;
        hist.push_front(longint'(x));
        for (int j = 0; j <= K; j++) if (j < hist.size()) acc += c[j] * hist[j];
        expect_y = acc & mask;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
