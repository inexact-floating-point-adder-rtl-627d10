// tb_loa_mantissa_adder: checks the lower-part-OR significand adder at
// four sizes of the inexact part (0, 8, 12 and all 24 bits), for addition
// and subtraction, against the integer LOA model of tb_fp_ref_pkg.
// With no inexact bits the result must also equal exact a + b and a - b.
module tb_loa_mantissa_adder;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [23:0] a, b;
  logic        sub;
  logic [23:0] s0, s8, s12, s24;
  logic        c0, c8, c12, c24;
  int checks = 0, failures = 0;

  loa_mantissa_adder #(.MANT_W(24), .N_APPROX(0))  d0  (.a(a), .b(b), .sub(sub), .sum(s0),  .cout(c0));
  loa_mantissa_adder #(.MANT_W(24), .N_APPROX(8))  d8  (.a(a), .b(b), .sub(sub), .sum(s8),  .cout(c8));
  loa_mantissa_adder #(.MANT_W(24), .N_APPROX(12)) d12 (.a(a), .b(b), .sub(sub), .sum(s12), .cout(c12));
  loa_mantissa_adder #(.MANT_W(24), .N_APPROX(24)) d24 (.a(a), .b(b), .sub(sub), .sum(s24), .cout(c24));

  task automatic cmp(string tag, logic [23:0] s, logic c, longint unsigned e);
    checks++;
    if ({c, s} !== 25'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h sub=%0d got %h exp %h", tag, a, b, sub, {c, s}, 25'(e));
    end
  endtask

  initial begin
    a = '0; b = '0; sub = 0;
    for (int i = 0; i < 4000; i++) begin
      a   = 24'($urandom);
      b   = (i % 3 == 0) ? 24'($urandom) >> ($urandom % 24) : 24'($urandom);
      sub = 1'(i % 2);
      @(negedge clk);
      cmp("n0",  s0,  c0,  ref_loa(a, b, sub, 0));
      cmp("n8",  s8,  c8,  ref_loa(a, b, sub, 8));
      cmp("n12", s12, c12, ref_loa(a, b, sub, 12));
      cmp("n24", s24, c24, ref_loa(a, b, sub, 24));
      checks++;
      if (s0 !== (sub ? 24'(a - b) : 24'(a + b))) begin
        failures++;
        $display("FAIL exact a=%h b=%h sub=%0d got %h", a, b, sub, s0);
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
