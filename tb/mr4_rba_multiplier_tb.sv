// mr4_rba_multiplier_tb: end-to-end test of the 16 x 16 multiplier at its
// default size.
// Applies the two worked examples (771 x 29 = 22359 and
// 771 x 45085 = 34760535), corner operands, walking ones and random
// operands, and compares the product with x * y computed here. It also
// counts how often each mechanism of the design was exercised and fails if
// one never was:
//   - each Booth digit (-2, -1, 0, +1, +2) and the negative zero (group 111)
//   - a negative and a positive first partial product (the two shapes of
//     the shortened sign extension)
//   - a non-zero ninth partial product (group {0, 0, y15} = +1)
//   - both branches of the adder's carry rule in the final RBA (digit sum
//     +-1 with the lower digits both non-negative, and otherwise)
//   - a redundant binary sum with a negative digit, so the final conversion
//     really subtracts
module mr4_rba_multiplier_tb;
  import mr4_pkg::*;

  localparam int N    = 16;
  localparam int ROWS = N/2 + 1;

  logic           clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  int n_digit [-2:2];
  int n_negzero = 0, n_row0_neg = 0, n_row0_pos = 0, n_last_row = 0;
  int n_rule_nonneg = 0, n_rule_other = 0, n_rb_negdigit = 0;

  always #5 clk = ~clk;

  mr4_rba_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // probe: one digit slice of the last adder of the tree
  rb_digit_t probe_a, probe_b;
  logic      probe_h;
  assign probe_a = dut.u_tree.g_lvl[3].g_node[0].g_add.u_rba.g_digit[20].u_cell.a;
  assign probe_b = dut.u_tree.g_lvl[3].g_node[0].g_add.u_rba.g_digit[20].u_cell.b;
  assign probe_h = dut.u_tree.g_lvl[3].g_node[0].g_add.u_rba.g_digit[20].u_cell.h_in;

  task automatic check_one(input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [2*N-1:0] want;
    logic [N+2:0]   yz;
    int d, ds;
    x = xv;
    y = yv;
    @(posedge clk);
    want = (2*N)'(xv) * (2*N)'(yv);
    checks++;
    if (p !== want) begin
      failures++;
      $display("%0d x %0d: got %0d, want %0d", xv, yv, p, want);
    end
    // mechanism counters, from the operands
    yz = {2'b00, yv, 1'b0};
    for (int j = 0; j < ROWS; j++) begin
      d = -2 * int'(yz[2*j+2]) + int'(yz[2*j+1]) + int'(yz[2*j]);
      n_digit[d]++;
      if (yz[2*j +: 3] == 3'b111) n_negzero++;
    end
    if (yz[2]) n_row0_neg++; else n_row0_pos++;
    if (yv[N-1]) n_last_row++;
    ds = int'(probe_a.pos) - int'(probe_a.neg) + int'(probe_b.pos) - int'(probe_b.neg);
    if (ds == 1 || ds == -1) begin
      if (probe_h) n_rule_nonneg++; else n_rule_other++;
    end
    for (int i = 0; i < 2*N; i++)
      if (dut.rb_sum[i].neg) begin
        n_rb_negdigit++;
        break;
      end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++) n_digit[d] = 0;
    check_one(16'd771, 16'd29);
    checks++;
    if (p != 32'd22359) begin failures++; $display("example 1: %0d", p); end
    check_one(16'd771, 16'd45085);
    checks++;
    if (p != 32'd34760535) begin failures++; $display("example 2: %0d", p); end
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, '1);
    check_one(16'h8000, 16'h8000);
    check_one(16'hAAAA, 16'h5555);
    check_one(16'h5555, 16'hAAAA);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) check_one(N'(1) << i, N'(1) << k);
    for (int i = 0; i < 200000; i++) check_one(N'($urandom), N'($urandom));

    need("Booth digit -2",                       n_digit[-2]);
    need("Booth digit -1",                       n_digit[-1]);
    need("Booth digit 0",                        n_digit[0]);
    need("Booth digit +1",                       n_digit[1]);
    need("Booth digit +2",                       n_digit[2]);
    need("negative zero group 111",              n_negzero);
    need("first partial product negative",       n_row0_neg);
    need("first partial product non-negative",   n_row0_pos);
    need("ninth partial product non-zero",       n_last_row);
    need("RBA rule, lower digits non-negative",  n_rule_nonneg);
    need("RBA rule, otherwise",                  n_rule_other);
    need("negative digit in RB sum",             n_rb_negdigit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
