// tb_exp_subtractor: checks the exponent subtractor exhaustively over all
// 65536 operand pairs, once exact and once with an inexact LSB. The
// expected difference is computed with integer arithmetic: exact a - b,
// or for the inexact LSB (a|b) in bit 0 and the upper bits
// (a>>1) - (b>>1) - (~a0 & b0). The borrow is a < b in both cases.
module tb_exp_subtractor;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] a, b, d0, d1;
  logic       bw0, bw1;
  int checks = 0, failures = 0;
  int lsb_effect = 0;

  exp_subtractor #(.EXP_W(8), .EXP_APPROX_BITS(0)) dut_exact (.a(a), .b(b), .diff(d0), .borrow(bw0));
  exp_subtractor #(.EXP_W(8), .EXP_APPROX_BITS(1)) dut_lsb   (.a(a), .b(b), .diff(d1), .borrow(bw1));

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        @(negedge clk);
        checks += 2;
        if (d0 !== 8'(i - j) || bw0 !== (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL exact %0d-%0d got %0d bw%0d", i, j, d0, bw0);
        end
        if (d1 !== 8'(ref_exp_sub(i, j, 1, 8)) || bw1 !== (i < j)) begin
          failures++;
          if (failures < 10) $display("FAIL lsb %0d-%0d got %0d bw%0d", i, j, d1, bw1);
        end
        lsb_effect += int'(d1 != d0);
      end
    end
    // the inexact LSB differs exactly when both LSBs are 1: a quarter of pairs
    checks++;
    if (lsb_effect != 16384) begin
      failures++;
      $display("FAIL inexact LSB changed %0d results, expected 16384", lsb_effect);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
