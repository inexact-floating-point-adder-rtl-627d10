// tb_hdr_design_sweep: the accuracy/precision trade-off of the adder on
// high-dynamic-range image addition. The same generated pair of images is
// added by six adder configurations at once:
//   N_APPROX = 24, 16, 12, 8, 0   inexact low bits of the significand adder
//   exponent LSB inexact only      (N_APPROX = 0, EXP_APPROX_BITS = 1)
// Each result is compared bit for bit with the integer reference model,
// and the mean relative error against `real` addition is accumulated per
// configuration. Making more significand bits exact must not make the
// mean error worse, and the fully exact significand path must stay within
// two units in the last place. The images are 128 x 128 pixels of
// luminance spanning about 2^-8 to 2^14 plus noise; all pixels are
// positive, as in luminance maps.
module tb_hdr_design_sweep;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int W = 128;
  localparam int H = 128;
  localparam int NCFG = 6;
  localparam int N_OF [NCFG] = '{24, 16, 12, 8, 0, 0};
  localparam int E_OF [NCFG] = '{0, 0, 0, 0, 0, 1};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [31:0] z [NCFG];
  fp_flags_t   f [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned LZ = (N_OF[g] > 23) ? 23 : N_OF[g];
    inexact_fp_adder #(.N_APPROX(N_OF[g]), .EXP_APPROX_BITS(E_OF[g]), .LZC_APPROX_BITS(LZ)) dut (
      .a(a), .b(b), .z(z[g]), .flags(f[g]));
  end

  int  checks = 0, failures = 0;
  real err_sum [NCFG];
  real max_exact_err;

  function automatic logic [31:0] real2sp(real r);
    logic [63:0] d;
    d = $realtobits(r);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic real pixel(int img, int x, int y);
    real g, v;
    g = (img == 0) ? real'(x * y) / real'(W * H) : real'(x + (H - 1 - y)) / real'(W + H);
    v = 2.0 ** (22.0 * g - 8.0);
    return v * (1.0 + real'($urandom % 1000) / 2000.0);
  endfunction

  initial begin
    ref_res_t r;
    real tr, got, rel;
    a = '0; b = '0;
    max_exact_err = 0.0;
    foreach (err_sum[k]) err_sum[k] = 0.0;
    for (int i = 0; i < W * H; i++) begin
      a = real2sp(pixel(0, i % W, i / W));
      b = real2sp(pixel(1, i % W, i / W));
      @(negedge clk);
      tr = sp2real(a) + sp2real(b);
      for (int k = 0; k < NCFG; k++) begin
        r = ref_add(a, b, N_OF[k], E_OF[k], (N_OF[k] > 23) ? 23 : N_OF[k]);
        checks++;
        if (z[k] !== r.z) begin
          failures++;
          if (failures < 10) $display("FAIL cfg%0d a=%h b=%h got %h exp %h", k, a, b, z[k], r.z);
        end
        got = sp2real(z[k]);
        rel = (tr - got) / tr;
        err_sum[k] += (rel < 0.0) ? -rel : rel;
        if (k == 4 && ((rel < 0.0) ? -rel : rel) > max_exact_err)
          max_exact_err = (rel < 0.0) ? -rel : rel;
      end
    end
    for (int k = 0; k < NCFG; k++)
      $display("N_APPROX=%0d EXP_APPROX_BITS=%0d: mean relative error %e", N_OF[k], E_OF[k],
               err_sum[k] / real'(W * H));
    for (int k = 1; k < 5; k++) begin
      checks++;
      if (err_sum[k] > err_sum[k-1]) begin
        failures++;
        $display("FAIL more exact bits gave a larger error (cfg %0d vs %0d)", k, k - 1);
      end
    end
    checks++;
    if (max_exact_err > 2.0 ** -22) begin
      failures++;
      $display("FAIL exact significand path error %e", max_exact_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W * H + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
