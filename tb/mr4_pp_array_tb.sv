// mr4_pp_array_tb: checks the modified radix-4 partial product array.
// For corner and random operands the N/2+1 rows must add up to x*y modulo
// 2^(2N). It also checks the shape: row 0 has nothing above bit N+3 (the
// shortened sign extension, bit 19 for N = 16), row j has nothing below bit
// 2j-2, and the last row (group {0, 0, y(N-1)}) is x shifted by N when
// y(N-1) is set, apart from the carried-in +1 of the row before it.
module mr4_pp_array_tb;
  localparam int N    = 16;
  localparam int ROWS = N/2 + 1;

  logic           clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] rows [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mr4_pp_array #(.N(N)) dut (.x(x), .y(y), .rows(rows));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [2*N-1:0] sum, want, low_mask;
    x = xv;
    y = yv;
    @(posedge clk);
    sum = '0;
    for (int j = 0; j < ROWS; j++) sum += rows[j];
    want = (2*N)'(xv) * (2*N)'(yv);
    checks++;
    if (sum !== want) begin
      failures++;
      $display("x=%0d y=%0d: rows sum to %0d, want %0d", xv, yv, sum, want);
    end
    checks++;
    if ((rows[0] >> (N + 4)) != 0) begin
      failures++;
      $display("row 0 extends past bit %0d: %h", N + 3, rows[0]);
    end
    for (int j = 2; j < ROWS; j++) begin
      low_mask = ((2*N)'(1) << (2*j - 2)) - 1;
      checks++;
      if ((rows[j] & low_mask) != 0) begin
        failures++;
        $display("row %0d has bits below %0d: %h", j, 2*j - 2, rows[j]);
      end
    end
    checks++;
    if ((rows[ROWS-1] >> N) != ((2*N)'(yv[N-1] ? xv : '0) & ((1 << N) - 1))) begin
      failures++;
      $display("last row %h for x=%0d y=%0d", rows[ROWS-1], xv, yv);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one(16'd771, 16'd29);
    check_one(16'd771, 16'd45085);
    check_one(16'hAAAA, 16'h5555);
    check_one(16'h8000, 16'hFFFF);
    for (int i = 0; i < 20000; i++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
