// tb_normalizer: checks normalization. For random sums the leading-zero
// count is computed in the testbench (exact), and the expected significand
// and exponent are worked out as integers: a carry out of an addition
// gives (2^24 + sum) / 2 and exponent + 1, otherwise sum * 2^lzc (24 bits)
// and exponent - lzc. Overflow is exponent >= 255, underflow <= 0.
module tb_normalizer;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [23:0] sum, mo;
  logic        cout, sub, ovf, unf, isz;
  logic [4:0]  lzc;
  logic [7:0]  ein, eo;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_carry = 0;

  normalizer #(.MANT_W(24), .EXP_W(8)) dut (
    .sum(sum), .cout(cout), .sub(sub), .lzc(lzc), .exp_in(ein),
    .mant_out(mo), .exp_out(eo), .ovf(ovf), .unf(unf), .is_zero(isz));

  initial begin
    int e;
    longint unsigned m;
    bit carry;
    sum = '0; cout = 0; sub = 0; lzc = '0; ein = '0;
    for (int i = 0; i < 5000; i++) begin
      sub  = 1'($urandom);
      cout = 1'($urandom);
      sum  = (i % 5 == 0) ? 24'd0 : 24'($urandom) >> ($urandom % 24);
      if (i % 3 == 0) sum[23] = 1'b1;
      ein  = (i % 7 == 0) ? 8'(250 + $urandom % 6) : 8'($urandom % 256);
      lzc  = 5'(ref_lzc(sum, 0));
      @(negedge clk);
      carry = cout && !sub;
      if (carry) begin
        m = (64'h100_0000 + sum) >> 1;
        e = int'(ein) + 1;
      end else begin
        m = (longint'(sum) << lzc) & 64'hFF_FFFF;
        e = int'(ein) - int'(lzc);
      end
      checks++;
      if (mo !== 24'(m) || ovf !== (e >= 255) || unf !== (e <= 0) ||
          isz !== (sum == 0 && !carry) || (e > 0 && e < 255 && eo !== 8'(e))) begin
        failures++;
        if (failures < 10)
          $display("FAIL sum=%h c%0d s%0d lzc%0d e%0d got m%h e%0d o%0d u%0d z%0d", sum, cout, sub,
                   lzc, ein, mo, eo, ovf, unf, isz);
      end
      n_ovf += int'(ovf); n_unf += int'(unf); n_carry += int'(carry);
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d carry=%0d", n_ovf, n_unf, n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
