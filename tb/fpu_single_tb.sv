// fpu_single_tb: the floating point unit built for IEEE single precision
// (8-bit exponent, 24-bit precision), end to end.
//
// Operands are drawn so that exponents often sit near the ends of the range
// or close to each other: denormals, overflow, underflow and cancellation all
// occur. Every result, flag and trap request is compared with the exact
// reference model fp_ref. Trapped results whose wrapped exponent leaves the
// field are unspecified and skipped. The
// data-path events listed at the end must each occur at least once. One vector
// per clock; a watchdog ends a stuck run.
module fpu_single_tb;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int N  = 8;
  localparam int P  = 24;
  localparam int W  = 32;
  localparam int NV = 100000;
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
  int c_sticky, c_cancel, c_sigovf, c_ovf1, c_ovf2, c_trap_ovf, c_trap_unf;
  int c_inf, c_xmax, c_denorm_out, c_mul_exact;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rand_field(logic [7:0] other);
    case ($urandom_range(0, 5))
      0: return 8'd0;
      1: return 8'($urandom_range(1, 30));
      2: return 8'($urandom_range(230, 254));
      3: return (other == 0 || other == 255) ? 8'd127 : other;
      4: return 8'($urandom_range(60, 190));
      default: return 8'($urandom_range(1, 254));
    endcase
  endfunction

  function automatic logic [W-1:0] rand_op(logic [10:0] other);
    logic [22:0] fr = 23'($urandom);
    if ($urandom_range(0, 3) == 0) fr = fr >> $urandom_range(0, 23);
    return {1'($urandom), rand_field(other), fr};
  endfunction

  initial begin
    ref_t::res_t r;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      op     = fpu_op_e'($urandom_range(0, 2));
      rmode  = round_mode_e'($urandom_range(0, 3));
      unf_en = ($urandom_range(0, 3) == 0);
      ovf_en = ($urandom_range(0, 3) == 0);
      inx_en = ($urandom_range(0, 3) == 0);
      a = rand_op(8'd127);
      b = rand_op(a[30:23]);
      if (op == OP_MUL && $urandom_range(0, 1) == 0)
        b[30:23] = (a[30:23] > 127) ? 8'($urandom_range(110, 150)) : 8'($urandom_range(0, 20));
      #1;
      if (op == OP_MUL) r = ref_t::mul(a, b, rmode, unf_en, ovf_en);
      else              r = ref_t::add(a, b, op == OP_SUB, rmode, unf_en, ovf_en);
      if (!r.valid) begin skipped++; continue; end

      if (op != OP_MUL && dut.u_adder.u_align.sticky) c_sticky++;
      if (op != OP_MUL && dut.g != 0 && dut.g[P+3:P+2] == 2'b00 && dut.u_adder.sa != dut.u_adder.sb) c_cancel++;
      if (op == OP_MUL && !(dut.fa[P-1] && dut.fb[P-1])) c_mul_exact++;
      if (dut.u_round.sig_ovf) c_sigovf++;
      if (dut.u_round.ovf1) c_ovf1++;
      if (dut.u_round.ovf2) c_ovf2++;
      if (ovf_en && f_ovf) c_trap_ovf++;
      if (unf_en && tiny) c_trap_unf++;
      if (f_ovf && !ovf_en && result[30:23] == '1) c_inf++;
      if (f_ovf && !ovf_en && result[30:23] != '1) c_xmax++;
      if (result[30:23] == '0 && result[22:0] != 0) c_denorm_out++;

      checks++;
      if (result !== r.bits || f_ovf !== r.ovf || f_unf !== r.unf || f_inx !== r.inx ||
          tiny !== r.tiny || special ||
          t_ovf !== (r.ovf && ovf_en) || t_unf !== (r.unf && unf_en) ||
          t_inx !== (r.inx && inx_en && !(r.ovf && ovf_en) && !(r.unf && unf_en))) begin
        failures++;
        if (failures < 20)
          $display("FAIL op=%s rm=%s ue=%b oe=%b a=%h b=%h got %h o%b u%b i%b t%b exp %h o%b u%b i%b t%b",
                   op.name(), rmode.name(), unf_en, ovf_en, a, b, result, f_ovf, f_unf, f_inx, tiny,
                   r.bits, r.ovf, r.unf, r.inx, r.tiny);
      end
    end
    checks += 11;
    if (c_sticky == 0)     begin failures++; $display("FAIL: no alignment sticky bit"); end
    if (c_cancel == 0)     begin failures++; $display("FAIL: no cancellation"); end
    if (c_mul_exact == 0)  begin failures++; $display("FAIL: no denormal product"); end
    if (c_sigovf == 0)     begin failures++; $display("FAIL: no significand overflow"); end
    if (c_ovf1 == 0)       begin failures++; $display("FAIL: no OVF1"); end
    if (c_ovf2 == 0)       begin failures++; $display("FAIL: no OVF2"); end
    if (c_trap_ovf == 0)   begin failures++; $display("FAIL: no trapped overflow"); end
    if (c_trap_unf == 0)   begin failures++; $display("FAIL: no trapped underflow"); end
    if (c_inf == 0)        begin failures++; $display("FAIL: no overflow to infinity"); end
    if (c_xmax == 0)       begin failures++; $display("FAIL: no overflow to x_max"); end
    if (c_denorm_out == 0) begin failures++; $display("FAIL: no denormal result"); end
    $display("events: sticky %0d cancel %0d mul_exact %0d sigovf %0d ovf1 %0d ovf2 %0d trap_ovf %0d trap_unf %0d inf %0d xmax %0d denorm %0d",
             c_sticky, c_cancel, c_mul_exact, c_sigovf, c_ovf1, c_ovf2, c_trap_ovf, c_trap_unf, c_inf, c_xmax, c_denorm_out);
    $display("skipped: %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
