// tb_align_shifter: checks the alignment shifter for every shift amount
// 0..255 with random significands; the expected value is m >> s, and zero
// for s >= 24.
module tb_align_shifter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [23:0] m_in, m_out, exp_v;
  logic [7:0]  sh;
  int checks = 0, failures = 0;

  align_shifter #(.MANT_W(24), .SH_W(8)) dut (.m_in(m_in), .shamt(sh), .m_out(m_out));

  initial begin
    m_in = '0; sh = '0;
    for (int s = 0; s < 256; s++) begin
      for (int k = 0; k < 8; k++) begin
        m_in = (k == 0) ? 24'hFF_FFFF : 24'($urandom);
        sh   = 8'(s);
        @(negedge clk);
        exp_v = (s >= 24) ? 24'd0 : 24'(m_in / (32'd1 << s));
        checks++;
        if (m_out !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL m=%h s=%0d got %h exp %h", m_in, s, m_out, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
