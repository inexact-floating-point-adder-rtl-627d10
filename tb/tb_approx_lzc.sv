// tb_approx_lzc: checks the leading-zero counter, exact (nothing ignored)
// and ignoring the low 12 or 23 bits, on values with every possible
// leading-one position and on zero. Expected counts come from scanning
// the value one bit at a time.
module tb_approx_lzc;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [23:0] m;
  logic [4:0]  l0, l12, l23;
  int checks = 0, failures = 0;

  approx_lzc #(.MANT_W(24), .LZC_APPROX_BITS(0))  d0  (.m(m), .lzc(l0));
  approx_lzc #(.MANT_W(24), .LZC_APPROX_BITS(12)) d12 (.m(m), .lzc(l12));
  approx_lzc #(.MANT_W(24), .LZC_APPROX_BITS(23)) d23 (.m(m), .lzc(l23));

  task automatic cmp(string tag, logic [4:0] got, int unsigned e);
    checks++;
    if (got !== 5'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%h got %0d exp %0d", tag, m, got, e);
    end
  endtask

  initial begin
    m = '0;
    for (int p = -1; p < 24; p++) begin
      for (int k = 0; k < 20; k++) begin
        if (p < 0) m = '0;
        else       m = (24'd1 << p) | (24'($urandom) & ((24'd1 << p) - 1));
        @(negedge clk);
        cmp("l0",  l0,  ref_lzc(m, 0));
        cmp("l12", l12, ref_lzc(m, 12));
        cmp("l23", l23, ref_lzc(m, 23));
      end
    end
    // spot values worked out by hand
    m = 24'h00_0800; @(negedge clk);
    cmp("hand0", l0, 12); cmp("hand12", l12, 12); cmp("hand23", l23, 1);
    m = 24'h00_0400; @(negedge clk);
    cmp("hand0", l0, 13); cmp("hand12", l12, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
