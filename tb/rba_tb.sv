// rba_tb: checks the W-digit redundant binary adder.
// Random digit strings (each digit -1, 0 or +1) plus all-(+1), all-(-1)
// and alternating patterns are added; the result must have no (1,1) digit
// and its value must equal the sum of the operand values modulo 2^W. The
// values are worked out here digit by digit.
module rba_tb;
  import mr4_pkg::*;

  localparam int W = 32;

  logic              clk = 1'b0;
  rb_digit_t [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rba #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] value(rb_digit_t [W-1:0] z);
    logic [W-1:0] v = '0;
    for (int i = 0; i < W; i++) begin
      if (z[i].pos) v += W'(1) << i;
      if (z[i].neg) v -= W'(1) << i;
    end
    return v;
  endfunction

  function automatic rb_digit_t [W-1:0] rand_rb();
    rb_digit_t [W-1:0] z;
    for (int i = 0; i < W; i++) begin
      case ($urandom_range(2))
        0:       z[i] = '{pos: 1'b0, neg: 1'b0};
        1:       z[i] = '{pos: 1'b1, neg: 1'b0};
        default: z[i] = '{pos: 1'b0, neg: 1'b1};
      endcase
    end
    return z;
  endfunction

  function automatic rb_digit_t [W-1:0] fill(int v0, int v1);
    rb_digit_t [W-1:0] z;
    for (int i = 0; i < W; i++) begin
      z[i].pos = ((i % 2 == 0) ? v0 : v1) == 1;
      z[i].neg = ((i % 2 == 0) ? v0 : v1) == -1;
    end
    return z;
  endfunction

  task automatic check_one(input rb_digit_t [W-1:0] av, input rb_digit_t [W-1:0] bv);
    a = av;
    b = bv;
    @(posedge clk);
    checks++;
    if (value(s) != value(av) + value(bv)) begin
      failures++;
      $display("sum %h, want %h", value(s), value(av) + value(bv));
    end
    checks++;
    for (int i = 0; i < W; i++)
      if (s[i].pos && s[i].neg) begin
        failures++;
        $display("digit %0d of the sum is (1,1)", i);
      end
  endtask

  initial begin
    for (int v0 = -1; v0 <= 1; v0++)
      for (int v1 = -1; v1 <= 1; v1++)
        for (int u0 = -1; u0 <= 1; u0++)
          for (int u1 = -1; u1 <= 1; u1++)
            check_one(fill(v0, v1), fill(u0, u1));
    for (int i = 0; i < 20000; i++) check_one(rand_rb(), rand_rb());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
