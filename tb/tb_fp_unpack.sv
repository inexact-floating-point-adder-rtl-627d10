// tb_fp_unpack: checks the unpacking stage on directed and random words.
// Expected fields are computed from the IEEE-754 bit layout with plain
// arithmetic. One word per clock; watchdog ends a hung run.
module tb_fp_unpack;
  import fp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] x;
  fp_unpacked_t u;
  int checks = 0, failures = 0;

  fp_unpack dut (.x(x), .u(u));

  task automatic apply(logic [31:0] v);
    int unsigned e;
    logic [23:0] m;
    bit z, inf, nan;
    x = v;
    @(negedge clk);
    e   = v >> 23 & 32'hFF;
    z   = (e == 0);
    inf = (e == 255) && ((v & 32'h7F_FFFF) == 0);
    nan = (e == 255) && ((v & 32'h7F_FFFF) != 0);
    m   = z ? 24'd0 : 24'((v & 32'h7F_FFFF) + 32'h80_0000);
    checks++;
    if (u.sign !== v[31] || u.exp !== 8'(e) || u.mant !== m || u.is_zero !== z ||
        u.is_inf !== inf || u.is_nan !== nan) begin
      failures++;
      $display("FAIL x=%h got s%0d e%h m%h z%0d i%0d n%0d", v, u.sign, u.exp, u.mant,
               u.is_zero, u.is_inf, u.is_nan);
    end
  endtask

  initial begin
    x = '0;
    apply(32'h0000_0000); apply(32'h8000_0000); apply(32'h0000_0001);
    apply(32'h3F80_0000); apply(32'hBF80_0001); apply(32'h7F80_0000);
    apply(32'hFF80_0000); apply(32'h7FC0_0000); apply(32'h7F7F_FFFF);
    for (int i = 0; i < 2000; i++) apply($urandom);
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
