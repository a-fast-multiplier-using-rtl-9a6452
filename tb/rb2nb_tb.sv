// rb2nb_tb: checks the redundant binary to normal binary converter.
// Random digit strings and the extremes (all +1, all -1, a single -1 at
// the bottom) are converted; the output must be the sum of the digit
// weights, accumulated here one digit at a time, modulo 2^W.
module rb2nb_tb;
  import mr4_pkg::*;

  localparam int W = 32;

  logic              clk = 1'b0;
  rb_digit_t [W-1:0] z;
  logic [W-1:0]      p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rb2nb #(.W(W)) dut (.z(z), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    for (int t = 0; t < 10000; t++) begin
      for (int i = 0; i < W; i++) begin
        case ((t < 2) ? t + 1 : (t == 2) ? ((i == 0) ? 2 : 0) : int'($urandom_range(2)))
          0:       z[i] = '{pos: 1'b0, neg: 1'b0};
          1:       z[i] = '{pos: 1'b1, neg: 1'b0};
          default: z[i] = '{pos: 1'b0, neg: 1'b1};
        endcase
      end
      @(posedge clk);
      acc = 0;
      for (int i = 0; i < W; i++) acc += (longint'(z[i].pos) - longint'(z[i].neg)) * (longint'(1) << i);
      checks++;
      if (p != W'(acc)) begin
        failures++;
        $display("converted %h, want %h", p, W'(acc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
