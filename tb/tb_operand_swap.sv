// tb_operand_swap: checks the compare-and-swap stage, exact and with an
// inexact exponent LSB. The expected order comes from comparing
// exponent*2^24 + significand as one integer; the expected shift is the
// exponent difference of the ordered pair (exact, or with its LSB replaced
// by the OR of the exponent LSBs and the upper bits borrow-corrected).
module tb_operand_swap;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  fp_unpacked_t a, b, l0, s0, l1, s1;
  logic [7:0] sh0, sh1;
  logic sw0, sw1;
  int checks = 0, failures = 0;

  operand_swap #(.EXP_APPROX_BITS(0)) d0 (.a(a), .b(b), .lrg(l0), .sml(s0), .shamt(sh0), .swapped(sw0));
  operand_swap #(.EXP_APPROX_BITS(1)) d1 (.a(a), .b(b), .lrg(l1), .sml(s1), .shamt(sh1), .swapped(sw1));

  function automatic fp_unpacked_t rnd(int unsigned emin, int unsigned emax);
    fp_unpacked_t u;
    u = '0;
    u.sign = 1'($urandom);
    u.exp  = 8'(emin + $urandom % (emax - emin + 1));
    u.mant = {1'b1, 23'($urandom)};
    return u;
  endfunction

  initial begin
    longint ka, kb;
    bit e_sw;
    int unsigned el, es;
    a = '0; b = '0;
    for (int i = 0; i < 4000; i++) begin
      a = rnd(1, 254);
      b = (i % 2) ? rnd(1, 254) : rnd(a.exp, a.exp);   // half with equal exponents
      if (i % 8 == 1) b.mant = a.mant;                  // some identical magnitudes
      @(negedge clk);
      ka = longint'(a.exp) * 64'h100_0000 + longint'(a.mant);
      kb = longint'(b.exp) * 64'h100_0000 + longint'(b.mant);
      e_sw = (kb > ka);
      el = e_sw ? b.exp : a.exp;
      es = e_sw ? a.exp : b.exp;
      checks += 2;
      if (sw0 !== e_sw || l0 !== (e_sw ? b : a) || s0 !== (e_sw ? a : b) || sh0 !== 8'(el - es)) begin
        failures++;
        if (failures < 10) $display("FAIL exact ea=%0d eb=%0d got sw%0d sh%0d", a.exp, b.exp, sw0, sh0);
      end
      if (sw1 !== e_sw || l1 !== (e_sw ? b : a) || sh1 !== 8'(ref_exp_sub(el, es, 1, 8))) begin
        failures++;
        if (failures < 10) $display("FAIL lsb ea=%0d eb=%0d got sw%0d sh%0d", a.exp, b.exp, sw1, sh1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
