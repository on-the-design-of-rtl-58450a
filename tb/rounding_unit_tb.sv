// rounding_unit_tb: the rounding unit against the exact reference model.
//
// Small format (N = 5, P = 8, 14 input fraction bits). Random factorings
// (sign, biased exponent, significand with a random number of leading zeros;
// a quarter of them chosen to round across the overflow or the denormal/normal
// boundary) are rounded in a random direction with random trap enables. The packed
// result {s_out, e_out, f_out}, the hidden bit, overflow, tiny and the inexact
// flag built from sig_inexact are compared with fp_ref applied to the exact
// input value. One vector per clock; a watchdog ends a stuck run.
module rounding_unit_tb;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N  = 5;
  localparam int P  = 8;
  localparam int FI = 14;
  localparam int EW = N + 3;
  localparam int NV = 100000;
  localparam int BIAS = 15;
  typedef fp_ref#(N, P) ref_t;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                 s_in, unf_en, ovf_en;
  logic signed [EW-1:0] e_in;
  logic [FI+1:0]        f_in;
  round_mode_e          rmode;
  logic                 s_out, tiny, overflow, sig_inexact;
  logic [N-1:0]         e_out;
  logic [P-1:0]         f_out;

  rounding_unit #(.N(N), .P(P), .FI(FI)) dut (.*);

  int checks = 0, failures = 0, skipped = 0;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t::res_t r;
    logic inexact;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      s_in   = 1'($urandom);
      rmode  = round_mode_e'($urandom_range(0, 3));
      unf_en = ($urandom_range(0, 2) == 0);
      ovf_en = ($urandom_range(0, 2) == 0);
      e_in   = EW'($urandom_range(0, 70)) - EW'(20);
      f_in   = (FI+2)'($urandom) >> $urandom_range(0, FI + 2);
      // every fourth vector: significand of nearly all ones close to the top
      // or bottom of the exponent range, so rounding carries across a boundary
      if (v % 4 == 0) begin
        f_in = '1;
        f_in = f_in >> $urandom_range(0, 2);
        f_in[$urandom_range(0, 4)] = 1'($urandom);
        e_in = ($urandom_range(0, 1) == 0) ? EW'($urandom_range(26, 33)) : EW'($urandom_range(0, 4));
      end
      #1;
      r = ref_t::round(s_in, ref_t::big_t'(f_in), int'(e_in) - BIAS - FI, rmode, unf_en, ovf_en);
      if (!r.valid) begin skipped++; continue; end
      inexact = sig_inexact | (overflow & ~ovf_en);
      checks++;
      if ({s_out, e_out, f_out[P-2:0]} !== r.bits || overflow !== r.ovf || tiny !== r.tiny ||
          inexact !== r.inx || f_out[P-1] !== (e_out != 0 && e_out != '1)) begin
        failures++;
        if (failures < 20)
          $display("FAIL s=%b e=%0d f=%h rm=%s ue=%b oe=%b got %b_%h_%h o%b t%b i%b exp %h o%b t%b i%b",
                   s_in, e_in, f_in, rmode.name(), unf_en, ovf_en, s_out, e_out, f_out,
                   overflow, tiny, inexact, r.bits, r.ovf, r.tiny, r.inx);
      end
    end
    $display("skipped (wrapped exponent out of range): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
