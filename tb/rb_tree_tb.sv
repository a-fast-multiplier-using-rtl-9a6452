// rb_tree_tb: checks the tree of redundant binary adders.
// Three trees are driven with random redundant binary operands: the
// multiplier's six-input tree, a five-input one (an odd operand is passed
// up a level) and a single-input one (no adder at all). Each sum must equal
// the sum of its operand values modulo 2^W and hold no (1,1) digit.
module rb_tree_tb;
  import mr4_pkg::*;

  localparam int W = 32;

  logic              clk = 1'b0;
  rb_digit_t [W-1:0] in6 [6];
  rb_digit_t [W-1:0] sum6, sum5, sum1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rb_tree #(.W(W), .K(6)) dut6 (.in(in6),       .sum(sum6));
  rb_tree #(.W(W), .K(5)) dut5 (.in(in6[0:4]),  .sum(sum5));
  rb_tree #(.W(W), .K(1)) dut1 (.in(in6[0:0]),  .sum(sum1));

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

  function automatic bit has11(rb_digit_t [W-1:0] z);
    for (int i = 0; i < W; i++) if (z[i].pos && z[i].neg) return 1'b1;
    return 1'b0;
  endfunction

  task automatic expect_sum(string name, rb_digit_t [W-1:0] got, logic [W-1:0] want);
    checks++;
    if (value(got) != want || has11(got)) begin
      failures++;
      $display("%s: sum %h, want %h", name, value(got), want);
    end
  endtask

  initial begin
    logic [W-1:0] v6, v5;
    for (int t = 0; t < 5000; t++) begin
      for (int k = 0; k < 6; k++)
        for (int i = 0; i < W; i++) begin
          case ((t < 3) ? t : int'($urandom_range(2)))
            0:       in6[k][i] = '{pos: 1'b0, neg: 1'b0};
            1:       in6[k][i] = '{pos: 1'b1, neg: 1'b0};
            default: in6[k][i] = '{pos: 1'b0, neg: 1'b1};
          endcase
        end
      @(posedge clk);
      v6 = '0;
      for (int k = 0; k < 6; k++) v6 += value(in6[k]);
      v5 = v6 - value(in6[5]);
      expect_sum("K=6", sum6, v6);
      expect_sum("K=5", sum5, v5);
      expect_sum("K=1", sum1, value(in6[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
