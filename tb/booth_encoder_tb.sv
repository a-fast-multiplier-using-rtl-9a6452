// booth_encoder_tb: exhaustive check of the radix-4 Booth encoder.
// For all eight groups the digit d = -2*y(2j+1) + y(2j) + y(2j-1) is worked
// out here and the select lines must satisfy one = (|d| == 1),
// two = (|d| == 2), neg = top bit of the group, and the rebuilt digit
// (one + 2*two, negated when neg) must equal d.
module booth_encoder_tb;
  import mr4_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag, rebuilt;
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      @(posedge clk);
      d   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = (d < 0) ? -d : d;
      rebuilt = int'(sel.one) + 2 * int'(sel.two);
      if (sel.neg) rebuilt = -rebuilt;
      checks += 4;
      if (sel.one !== (mag == 1)) begin failures++; $display("group %b: one=%b", grp, sel.one); end
      if (sel.two !== (mag == 2)) begin failures++; $display("group %b: two=%b", grp, sel.two); end
      if (sel.neg !== grp[2])     begin failures++; $display("group %b: neg=%b", grp, sel.neg); end
      if (rebuilt != d)           begin failures++; $display("group %b: digit %0d, want %0d", grp, rebuilt, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
