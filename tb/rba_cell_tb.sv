// rba_cell_tb: exhaustive check of one redundant binary adder digit slice.
// Every pair of digits (-1, 0, +1) is applied with every lower-position
// context that can occur: lower digits both non-negative (h_in = 1, carry
// in 0 or +1) or not (h_in = 0, carry in 0 or -1). The expected
// intermediate carry and sum come from the computation rule written out
// below as a table; the sum digit must be w + c_in and h_out must say
// whether both digits are non-negative. Both branches of the rule (carry
// chosen by the lower digits' signs) are counted and must occur.
module rba_cell_tb;
  import mr4_pkg::*;

  logic      clk = 1'b0;
  rb_digit_t a, b, c_in, c_out, s;
  logic      h_in, h_out;
  int checks = 0, failures = 0;
  int n_nonneg_rule = 0, n_neg_rule = 0;

  always #5 clk = ~clk;

  rba_cell dut (.a(a), .b(b), .h_in(h_in), .c_in(c_in), .h_out(h_out), .c_out(c_out), .s(s));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rb_digit_t enc(int v);
    rb_digit_t d;
    d.pos = (v == 1);
    d.neg = (v == -1);
    return d;
  endfunction

  function automatic int dec(rb_digit_t d);
    return int'(d.pos) - int'(d.neg);
  endfunction

  // computation rule: intermediate carry and sum for digits (x, y)
  task automatic rule(input int xv, input int yv, input logic lower_nonneg,
                      output int cv, output int wv);
    cv = 0;
    wv = 0;
    if      (xv == 1 && yv == 1)   begin cv = 1;  wv = 0; end
    else if (xv + yv == 1)         begin
      if (lower_nonneg) begin cv = 1; wv = -1; end
      else              begin cv = 0; wv = 1;  end
    end
    else if (xv + yv == -1)        begin
      if (lower_nonneg) begin cv = 0;  wv = -1; end
      else              begin cv = -1; wv = 1;  end
    end
    else if (xv == -1 && yv == -1) begin cv = -1; wv = 0; end
  endtask

  initial begin
    int cv, wv;
    for (int xv = -1; xv <= 1; xv++)
      for (int yv = -1; yv <= 1; yv++)
        for (int h = 0; h <= 1; h++)
          for (int ci = 0; ci <= 1; ci++) begin
            a    = enc(xv);
            b    = enc(yv);
            h_in = h[0];
            c_in = enc(h ? ci : -ci);
            @(posedge clk);
            rule(xv, yv, h[0], cv, wv);
            if (xv + yv == 1 || xv + yv == -1) begin
              if (h) n_nonneg_rule++;
              else   n_neg_rule++;
            end
            checks += 4;
            if (dec(c_out) != cv || (c_out.pos && c_out.neg)) begin
              failures++;
              $display("a=%0d b=%0d h=%0d: carry %0d want %0d", xv, yv, h, dec(c_out), cv);
            end
            if (dec(s) != wv + dec(c_in) || (s.pos && s.neg)) begin
              failures++;
              $display("a=%0d b=%0d h=%0d cin=%0d: sum %0d want %0d", xv, yv, h, dec(c_in), dec(s), wv + dec(c_in));
            end
            if (h_out !== (xv >= 0 && yv >= 0)) begin
              failures++;
              $display("a=%0d b=%0d: h_out=%b", xv, yv, h_out);
            end
            if (2 * dec(c_out) + dec(s) - dec(c_in) != xv + yv) begin
              failures++;
              $display("a=%0d b=%0d: value not preserved", xv, yv);
            end
          end
    checks++;
    if (n_nonneg_rule == 0 || n_neg_rule == 0) failures++;
    $display("rule branches: lower non-negative %0d, otherwise %0d", n_nonneg_rule, n_neg_rule);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
