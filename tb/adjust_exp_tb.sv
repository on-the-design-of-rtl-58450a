// adjust_exp_tb: exponent adjust for N = 5 (bias 15, e_max field 30,
// alpha = 24). Every exponent from -20 to 60 with every combination of
// msb(f3), tiny and the overflow trap enable. Expected: ovf2 only at field
// 31; a trapped rounding overflow gives field 31 - 24 = 7; a tiny result in
// the denormal representation (0) that rounded to a normal significand moves
// to field 1; anything else is unchanged. Watchdog included.
module adjust_exp_tb;
  localparam int N  = 5;
  localparam int EW = N + 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [EW-1:0] e2, e3;
  logic                 msb_f3, tiny, ovf_en, ovf2;

  adjust_exp #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (81 * 8 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xe;
    for (int e = -20; e <= 60; e++)
      for (int c = 0; c < 8; c++) begin
        @(posedge clk);
        e2 = EW'(e); {msb_f3, tiny, ovf_en} = 3'(c);
        #1;
        if (ovf_en && e == 31)            xe = 7;
        else if (msb_f3 && tiny && e == 0) xe = 1;
        else                               xe = e;
        checks++;
        if (e3 !== EW'(xe) || ovf2 !== (e == 31)) begin
          failures++;
          if (failures < 10) $display("FAIL e2=%0d c=%0d got %0d %b", e, c, e3, ovf2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
