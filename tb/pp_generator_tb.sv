// pp_generator_tb: checks one Booth partial product row.
// For random multiplicands and every Booth digit d the row value
// {sign, pp} (read as an N+2 bit two's complement number) plus neg_lsb must
// equal d * x. The select lines are formed here from d, not by the encoder.
module pp_generator_tb;
  import mr4_pkg::*;

  localparam int N = 16;

  logic         clk = 1'b0;
  logic [N-1:0] x;
  booth_sel_t   sel;
  logic [N:0]   pp;
  logic         sign, neg_lsb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pp_generator #(.N(N)) dut (.x(x), .sel(sel), .pp(pp), .sign(sign), .neg_lsb(neg_lsb));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] xv, input int d, input logic negzero);
    longint got, want;
    x       = xv;
    sel.one = (d == 1) || (d == -1);
    sel.two = (d == 2) || (d == -2);
    sel.neg = (d < 0) || negzero;
    @(posedge clk);
    got  = longint'($signed({sign, pp})) + longint'(neg_lsb);
    want = longint'(d) * longint'(xv);
    checks++;
    if (got != want) begin
      failures++;
      $display("x=%0d d=%0d: row %0d, want %0d", xv, d, got, want);
    end
  endtask

  initial begin
    logic [N-1:0] xv;
    for (int i = 0; i < 2000; i++) begin
      xv = (i == 0) ? '0 : (i == 1) ? '1 : (i == 2) ? N'(1) : N'($urandom);
      for (int d = -2; d <= 2; d++) check_one(xv, d, 1'b0);
      check_one(xv, 0, 1'b1);  // group 111: negative zero
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
