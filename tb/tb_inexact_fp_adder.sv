// tb_inexact_fp_adder: end-to-end test of the inexact single-precision
// adder in its three configurations side by side:
//   dut_all  defaults: all 24 significand-adder bits inexact
//   dut_exp  only the exponent-subtractor LSB inexact
//   dut_ex   nothing inexact (exact datapath, truncating)
// Every result and flag is compared with the integer reference model of
// tb_fp_ref_pkg. The exact instance is also held against `real` addition:
// its error may not exceed two units in the last place of the larger
// operand (one for the missing guard bit, one for truncation).
// The test counts how often each mechanism of the datapath was exercised
// (operand swap, alignment shifting everything out, carry normalization,
// left normalization, overflow, underflow, cancellation to zero, infinity
// and NaN handling, and results where the inexact parts change the answer)
// and counts a failure for any that never happened.
// A new vector is applied every clock; the adder is combinational, so its
// outputs are checked half a cycle later.
module tb_inexact_fp_adder;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned N_RANDOM = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [31:0] z_all, z_exp, z_ex;
  fp_flags_t   f_all, f_exp, f_ex;

  inexact_fp_adder dut_all (.a(a), .b(b), .z(z_all), .flags(f_all));
  inexact_fp_adder #(.N_APPROX(0), .EXP_APPROX_BITS(1), .LZC_APPROX_BITS(0)) dut_exp (
    .a(a), .b(b), .z(z_exp), .flags(f_exp));
  inexact_fp_adder #(.N_APPROX(0), .EXP_APPROX_BITS(0), .LZC_APPROX_BITS(0)) dut_ex (
    .a(a), .b(b), .z(z_ex), .flags(f_ex));

  int checks = 0, failures = 0;
  int n_swap = 0, n_allshift = 0, n_carry = 0, n_left = 0, n_ovf = 0, n_unf = 0;
  int n_zero = 0, n_inf = 0, n_nan = 0, n_loa_diff = 0, n_exp_diff = 0;

  task automatic check_one(string tag, logic [31:0] z, fp_flags_t f, ref_res_t r);
    checks++;
    if (z !== r.z || f.overflow !== r.ovf || f.underflow !== r.unf ||
        f.zero !== r.zero || f.invalid !== r.inv) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h got %h ovf%0d unf%0d z%0d inv%0d exp %h ovf%0d unf%0d z%0d inv%0d",
                 tag, a, b, z, f.overflow, f.underflow, f.zero, f.invalid,
                 r.z, r.ovf, r.unf, r.zero, r.inv);
    end
  endtask

  task automatic apply(logic [31:0] va, logic [31:0] vb);
    ref_res_t r_all, r_exp, r_ex;
    real tr, got, tol;
    int el;
    a = va; b = vb;
    @(negedge clk);
    r_all = ref_add(va, vb, 24, 0, 23);
    r_exp = ref_add(va, vb, 0, 1, 0);
    r_ex  = ref_add(va, vb, 0, 0, 0);
    check_one("all", z_all, f_all, r_all);
    check_one("exp", z_exp, f_exp, r_exp);
    check_one("exact", z_ex, f_ex, r_ex);
    // exact configuration against real arithmetic
    if (va[30:23] != 0 && vb[30:23] != 0 && va[30:23] != 8'hFF && vb[30:23] != 8'hFF &&
        !r_ex.ovf && !r_ex.unf) begin
      tr  = sp2real(va) + sp2real(vb);
      got = sp2real(z_ex);
      el  = (va[30:23] > vb[30:23]) ? int'(va[30:23]) : int'(vb[30:23]);
      tol = 2.0 ** (el - 127 - 22);
      checks++;
      if ((got - tr > tol) || (tr - got > tol)) begin
        failures++;
        $display("FAIL real a=%h b=%h got %h (%g) true %g", va, vb, z_ex, got, tr);
      end
    end
    // coverage
    n_swap     += int'(r_ex.swapped);
    n_allshift += int'(r_ex.all_shifted);
    n_carry    += int'(r_all.carry_norm) + int'(r_ex.carry_norm);
    n_left     += int'(r_ex.left_norm);
    n_ovf      += int'(f_ex.overflow);
    n_unf      += int'(f_ex.underflow);
    n_zero     += int'(f_ex.zero && !f_ex.underflow);
    n_inf      += int'(z_ex[30:0] == {8'hFF, 23'd0});
    n_nan      += int'(f_ex.invalid);
    n_loa_diff += int'(z_all != z_ex);
    n_exp_diff += int'(z_exp != z_ex);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    a = '0; b = '0;
    // directed corner cases
    apply(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1: carry normalization
    apply(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1: cancellation to zero
    apply(32'h3F80_0000, 32'hBF7F_FFFF);   // 1 - (1-ulp/2): deep left shift
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // max + max: overflow
    apply(32'h0080_0001, 32'h8080_0000);   // min-normal difference: underflow
    apply(32'h7F80_0000, 32'h3F80_0000);   // inf + 1
    apply(32'h7F80_0000, 32'hFF80_0000);   // inf - inf: invalid
    apply(32'h7FC0_0001, 32'h3F80_0000);   // NaN + 1
    apply(32'h0000_0000, 32'h4049_0FDB);   // 0 + pi
    apply(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    apply(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24: aligned away
    apply(32'h3F80_0000, 32'h4000_0000);   // 1 + 2: swap
    apply(32'h3FC0_0000, 32'h3F40_0000);   // equal odd exponents? (127 vs 126)
    apply(32'h4040_0000, 32'h4000_0000);   // exponents equal and odd (128): exp LSB effect
    // random, mixed exponent spreads
    for (int i = 0; i < N_RANDOM; i++) begin
      case (i % 4)
        0: apply(rand_sp(1, 254), rand_sp(1, 254));
        1: apply(rand_sp(120, 135), rand_sp(120, 135));
        2: begin
             logic [31:0] x;
             x = rand_sp(100, 150);
             apply(x, {~x[31], x[30:23], x[22:0] ^ 23'($urandom % 16)});
           end
        default: apply(rand_sp(240, 254), rand_sp(1, 12));
      endcase
    end
    need("operand swap", n_swap);
    need("alignment shifts everything out", n_allshift);
    need("carry normalization", n_carry);
    need("left normalization", n_left);
    need("overflow", n_ovf);
    need("underflow", n_unf);
    need("cancellation to zero", n_zero);
    need("infinity result", n_inf);
    need("NaN / invalid", n_nan);
    need("inexact significand adder changes a result", n_loa_diff);
    need("inexact exponent LSB changes a result", n_exp_diff);
    $display("coverage: swap=%0d allshift=%0d carry=%0d left=%0d ovf=%0d unf=%0d zero=%0d inf=%0d nan=%0d loa_diff=%0d exp_diff=%0d",
             n_swap, n_allshift, n_carry, n_left, n_ovf, n_unf, n_zero, n_inf, n_nan,
             n_loa_diff, n_exp_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
