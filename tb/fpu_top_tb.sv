// fpu_top_tb: end-to-end test of the floating point unit in a small format.
//
// The unit is built with a 5-bit exponent and 8-bit precision so that random
// operands reach every corner: denormals, cancellation, overflow, underflow,
// both traps and all rounding directions. Each vector (operation, direction,
// trap enables, two finite operands) is applied on a clock edge and the result
// bits, the overflow, underflow, inexact and tiny flags and the three trap
// requests are compared with
// the exact reference model fp_ref. Trapped results whose wrapped exponent
// leaves the field are unspecified and skipped. Internal events of the data
// path (swap, sticky bit, cancellation, significand overflow, denormal turned
// normal, both overflow sources, both traps, saturation to infinity and to
// x_max, the zero sign rule, both multiplier paths, an inexact trap held back
// by an overflow or underflow trap) are counted; an event that
// never happens is a failure. A watchdog ends the run after a fixed number of
// cycles.
module fpu_top_tb;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N  = 5;
  localparam int P  = 8;
  localparam int W  = N + P;
  localparam int NV = 200000;
  typedef fp_ref#(N, P) ref_t;

  logic clk = 0;
  always #5 clk = ~clk;

  fpu_op_e      op;
  round_mode_e  rmode;
  logic         unf_en, ovf_en, inx_en;
  logic [W-1:0] a, b, result;
  logic         f_ovf, f_unf, f_inx, tiny, special;
  logic         t_ovf, t_unf, t_inx;

  fpu_top #(.N(N), .P(P)) dut (
    .op, .rmode, .unf_en, .ovf_en, .inx_en, .a, .b, .result,
    .flag_overflow(f_ovf), .flag_underflow(f_unf), .flag_inexact(f_inx),
    .trap_overflow(t_ovf), .trap_underflow(t_unf), .trap_inexact(t_inx),
    .tiny, .operand_special(special)
  );

  int checks = 0, failures = 0, skipped = 0;

  // event counters
  int c_swap, c_sticky, c_cancel, c_sigovf, c_den2norm, c_ovf1, c_ovf2;
  int c_trap_ovf, c_trap_unf, c_inf, c_xmax, c_zero_sign, c_mul_rep, c_mul_exact;
  int c_denorm_out, c_trap_prec, c_mode[4];

  initial begin
    repeat (NV * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_finite();
    logic [W-1:0] x;
    do x = W'($urandom); while (x[W-2:P-1] == '1);
    return x;
  endfunction

  task automatic count_events();
    if (op != OP_MUL) begin
      if (dut.u_adder.swapped) c_swap++;
      if (dut.u_adder.u_align.sticky) c_sticky++;
      if (dut.g != 0 && dut.g[P+3:P+2] == 2'b00 && dut.u_adder.sa != dut.u_adder.sb) c_cancel++;
      if (dut.g == 0 && dut.sa != dut.sb_eff) c_zero_sign++;
    end else begin
      if (dut.fa[P-1] && dut.fb[P-1]) c_mul_rep++;
      else c_mul_exact++;
    end
    if (dut.u_round.sig_ovf) c_sigovf++;
    if (dut.u_round.f3[P-1] && dut.tiny && dut.u_round.e2 == 0) c_den2norm++;
    if (dut.u_round.ovf1) c_ovf1++;
    if (dut.u_round.ovf2) c_ovf2++;
    if (ovf_en && f_ovf) c_trap_ovf++;
    if (unf_en && tiny) c_trap_unf++;
    if (f_ovf && !ovf_en && result[W-2:P-1] == '1) c_inf++;
    if (f_ovf && !ovf_en && result[W-2:P-1] != '1) c_xmax++;
    if (result[W-2:P-1] == '0 && result[P-2:0] != 0) c_denorm_out++;
    if (inx_en && f_inx && (t_ovf || t_unf)) c_trap_prec++;
    c_mode[rmode]++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: event never happened: %s", what);
    end else $display("event %-28s %0d", what, n);
  endtask

  initial begin
    ref_t::res_t exp_r;
    @(posedge clk);
    // an infinite operand is flagged
    op = OP_ADD; rmode = RM_RNE; unf_en = 0; ovf_en = 0; inx_en = 0;
    a = {1'b0, {N{1'b1}}, {(P-1){1'b0}}}; b = '0;
    #1 checks++;
    if (!special) begin failures++; $display("FAIL: operand_special"); end

    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      op     = fpu_op_e'($urandom_range(0, 2));
      rmode  = round_mode_e'($urandom_range(0, 3));
      unf_en = ($urandom_range(0, 3) == 0);
      ovf_en = ($urandom_range(0, 3) == 0);
      inx_en = ($urandom_range(0, 3) == 0);
      a = rand_finite();
      b = rand_finite();
      #1;
      if (op == OP_MUL) exp_r = ref_t::mul(a, b, rmode, unf_en, ovf_en);
      else              exp_r = ref_t::add(a, b, op == OP_SUB, rmode, unf_en, ovf_en);
      if (!exp_r.valid) begin skipped++; continue; end
      count_events();
      checks++;
      if (result !== exp_r.bits || f_ovf !== exp_r.ovf || f_unf !== exp_r.unf ||
          f_inx !== exp_r.inx || tiny !== exp_r.tiny || special ||
          t_ovf !== (exp_r.ovf && ovf_en) || t_unf !== (exp_r.unf && unf_en) ||
          t_inx !== (exp_r.inx && inx_en && !(exp_r.ovf && ovf_en) && !(exp_r.unf && unf_en))) begin
        failures++;
        if (failures < 20)
          $display("FAIL op=%s rm=%s ue=%b oe=%b a=%h b=%h got %h o%b u%b i%b t%b exp %h o%b u%b i%b t%b",
                   op.name(), rmode.name(), unf_en, ovf_en, a, b, result, f_ovf, f_unf, f_inx, tiny,
                   exp_r.bits, exp_r.ovf, exp_r.unf, exp_r.inx, exp_r.tiny);
      end
    end

    need("swap", c_swap);
    need("alignment sticky bit", c_sticky);
    need("cancellation", c_cancel);
    need("exact zero sign rule", c_zero_sign);
    need("multiplier rep_p path", c_mul_rep);
    need("multiplier exact path", c_mul_exact);
    need("significand overflow", c_sigovf);
    need("denormal rounded to normal", c_den2norm);
    need("OVF1", c_ovf1);
    need("OVF2", c_ovf2);
    need("trapped overflow", c_trap_ovf);
    need("trapped underflow", c_trap_unf);
    need("overflow to infinity", c_inf);
    need("overflow to x_max", c_xmax);
    need("denormal result", c_denorm_out);
    need("inexact trap yields to ovf/unf", c_trap_prec);
    for (int m = 0; m < 4; m++) need($sformatf("rounding mode %0d", m), c_mode[m]);
    $display("skipped (wrapped exponent out of range): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
