// mr4_rba_multiplier_n8_tb: exhaustive test of the multiplier built at
// N = 8 (5 partial products, 3 RBPPs plus the correction, two tree levels).
// All 65536 operand pairs are applied and the 16-bit product is compared
// with x * y computed here. It shows that the array, the RBPP pairing, the
// correction constant and the tree are written for any even width, not
// only for 16 bits.
module mr4_rba_multiplier_n8_tb;
  localparam int N = 8;

  logic           clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mr4_rba_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        x = N'(a);
        y = N'(b);
        @(posedge clk);
        checks++;
        if (p != (2*N)'(a * b)) begin
          failures++;
          if (failures < 10) $display("%0d x %0d: got %0d, want %0d", a, b, p, a * b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
