// rbpp_gen_tb: checks the normal binary to redundant binary conversion.
// The digit string must never hold the pair (1,1), digit i must equal
// a(i) - ~b(i), and its value (pos word minus neg word) must be A + B + 1
// modulo 2^W, i.e. A + B once the conversion's (0,1) correction is applied.
module rbpp_gen_tb;
  import mr4_pkg::*;

  localparam int W = 32;

  logic              clk = 1'b0;
  logic [W-1:0]      a, b;
  rb_digit_t [W-1:0] z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rbpp_gen #(.W(W)) dut (.a(a), .b(b), .z(z));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] av, input logic [W-1:0] bv);
    logic [W-1:0] value;
    int dg;
    logic nb;
    a = av;
    b = bv;
    @(posedge clk);
    value = '0;
    for (int i = 0; i < W; i++) begin
      nb = ~bv[i];
      dg = int'(av[i]) - int'(nb);
      checks++;
      if (z[i].pos && z[i].neg) begin
        failures++;
        $display("digit %0d is (1,1)", i);
      end else if (int'(z[i].pos) - int'(z[i].neg) != dg) begin
        failures++;
        $display("a=%h b=%h digit %0d wrong", av, bv, i);
      end
      if (z[i].pos) value += W'(1) << i;
      if (z[i].neg) value -= W'(1) << i;
    end
    checks++;
    if (value - 1 != av + bv) begin
      failures++;
      $display("a=%h b=%h: RBPP value-1 %h, want %h", av, bv, value - 1, av + bv);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, '1);
    for (int i = 0; i < 5000; i++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
