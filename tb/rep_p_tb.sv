// rep_p_tb: exhaustive test of the sticky merge for P = 8.
//
// For every 11-bit input (the (P+1)-representative of a significand) the
// expected P-representative is computed arithmetically: the input halved when
// it is a multiple of 4 (exact), otherwise the nearest odd value 2*floor(x/4)+1
// (an open interval of the coarser grid). One input per clock, watchdog.
module rep_p_tb;
  localparam int P = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [P+2:0] f_n;
  logic [P+1:0] f1;

  rep_p #(.P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat ((1 << (P + 3)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, e;
    for (x = 0; x < (1 << (P + 3)); x++) begin
      @(posedge clk);
      f_n = (P+3)'(x);
      #1;
      e = (x % 4 == 0) ? x / 2 : (x / 4) * 2 + 1;
      checks++;
      if (f1 !== (P+2)'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL f_n=%h got %h exp %h", f_n, f1, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
