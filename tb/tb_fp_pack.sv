// tb_fp_pack: checks result packing and flag priority with directed cases
// (NaN, inf - inf, infinity, zero operands, zero sum, underflow, overflow)
// and random normal results; each expected word is written out by hand or
// assembled from its fields.
module tb_fp_pack;
  import fp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        sign, ovf, unf, szero;
  logic [7:0]  e;
  logic [23:0] m;
  fp_unpacked_t a, b;
  logic [31:0] z;
  fp_flags_t   f;
  int checks = 0, failures = 0;

  fp_pack dut (.sign(sign), .exp_n(e), .mant_n(m), .ovf(ovf), .unf(unf), .sum_zero(szero),
               .a(a), .b(b), .z(z), .flags(f));

  function automatic fp_unpacked_t num(logic s, logic [7:0] ex, logic [22:0] fr);
    fp_unpacked_t u;
    u.sign = s; u.exp = ex; u.mant = (ex == 0) ? 24'd0 : {1'b1, fr};
    u.is_zero = (ex == 0); u.is_inf = (ex == 8'hFF) && (fr == 0);
    u.is_nan = (ex == 8'hFF) && (fr != 0);
    return u;
  endfunction

  task automatic expect_out(string tag, logic [31:0] ez, logic [3:0] ef);
    @(negedge clk);
    checks++;
    if (z !== ez || f !== fp_flags_t'(ef)) begin
      failures++;
      $display("FAIL %s got %h flags %b exp %h flags %b", tag, z, f, ez, ef);
    end
  endtask

  initial begin
    sign = 0; ovf = 0; unf = 0; szero = 0; e = 8'd130; m = 24'hC0_0000;
    a = num(0, 8'd130, 23'h40_0000); b = num(0, 8'd128, 23'h0);
    expect_out("normal", {1'b0, 8'd130, 23'h40_0000}, 4'b0000);
    b = num(0, 8'hFF, 23'h1);           expect_out("nan b",   32'h7FC0_0000, 4'b0001);
    a = num(0, 8'hFF, 23'h0); b = num(1, 8'hFF, 23'h0);
                                        expect_out("inf-inf", 32'h7FC0_0000, 4'b0001);
    b = num(0, 8'hFF, 23'h0);           expect_out("inf+inf", 32'h7F80_0000, 4'b0000);
    a = num(0, 8'd3, 23'h0); b = num(1, 8'hFF, 23'h0);
                                        expect_out("x-inf",   32'hFF80_0000, 4'b0000);
    a = num(1, 8'd0, 23'h0); b = num(1, 8'd0, 23'h0);
                                        expect_out("-0+-0",   32'h8000_0000, 4'b0010);
    a = num(1, 8'd77, 23'h1234); b = num(0, 8'd0, 23'h0);
                                        expect_out("a+0",     {1'b1, 8'd77, 23'h1234}, 4'b0000);
    a = num(0, 8'd0, 23'h55); b = num(0, 8'd90, 23'h7);
                                        expect_out("0+b",     {1'b0, 8'd90, 23'h7}, 4'b0000);
    a = num(0, 8'd90, 23'h7); b = num(1, 8'd90, 23'h7); szero = 1;
                                        expect_out("cancel",  32'h0, 4'b0010);
    szero = 0; unf = 1; sign = 1;       expect_out("unf",     32'h8000_0000, 4'b0110);
    unf = 0; ovf = 1; sign = 0;         expect_out("ovf",     32'h7F80_0000, 4'b1000);
    ovf = 0;
    a = num(0, 8'd100, 23'h0); b = num(0, 8'd99, 23'h0);
    for (int i = 0; i < 500; i++) begin
      sign = 1'($urandom); e = 8'(1 + $urandom % 254); m = {1'b1, 23'($urandom)};
      expect_out("rand", {sign, e, m[22:0]}, 4'b0000);
    end
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
