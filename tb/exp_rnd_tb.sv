// exp_rnd_tb: exponent rounding for N = 5, P = 8.
//
// Random (e3, f3), overflow, trap enable, sign and direction. With no
// untrapped overflow the inputs pass (exponent truncated to its field); with
// one, infinity (field 31, significand 0) or the largest finite number
// (field 30, significand 8'hff) is expected according to the table of
// directions and signs written out below. Watchdog included.
module exp_rnd_tb;
  import fpu_pkg::*;
  localparam int N  = 5;
  localparam int P  = 8;
  localparam int EW = N + 3;
  localparam int NV = 4000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [EW-1:0] e3;
  logic [P-1:0]         f3, f_out;
  logic                 overflow, ovf_en, s;
  round_mode_e          rmode;
  logic [N-1:0]         e_out;

  exp_rnd #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xe, xf;
    logic to_inf;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      e3 = EW'($urandom_range(0, 31)); f3 = P'($urandom);
      overflow = 1'($urandom); ovf_en = 1'($urandom); s = 1'($urandom);
      rmode = round_mode_e'($urandom_range(0, 3));
      #1;
      // RNE -> inf; RZ -> max; RPI -> inf if positive; RMI -> inf if negative
      to_inf = (rmode == RM_RNE) || (rmode == RM_RPI && !s) || (rmode == RM_RMI && s);
      if (overflow && !ovf_en) begin
        xe = to_inf ? 31 : 30;
        xf = to_inf ? 0 : 255;
      end else begin
        xe = int'(e3); xf = int'(f3);
      end
      checks++;
      if (e_out !== N'(xe) || f_out !== P'(xf)) begin
        failures++;
        if (failures < 10) $display("FAIL e3=%0d ov=%b oe=%b s=%b rm=%0d got %0d %h", e3, overflow, ovf_en, s, rmode, e_out, f_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
