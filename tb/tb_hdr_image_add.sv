// tb_hdr_image_add: adds two synthetic high-dynamic-range images pixel by
// pixel through the adder at its default parameters (all significand-adder
// bits inexact), the use the adder is meant for.
//
// The images are W x H single-precision luminance maps generated in the
// testbench: a smooth gradient spanning about 2^-8 to 2^14, a bright
// disc and per-pixel noise, so neighbouring pixels differ in exponent by
// small amounts and bright and dark regions meet. Every output pixel is
// compared bit for bit with the integer reference model, and its error
// against exact `real` addition is measured. For two positive operands the
// OR of the significands lies between the larger one and their sum, and a
// carry (both leading bits set) adds at most half of the result, so each
// pixel's relative error must stay below 50 % in magnitude. The mean relative error and the share of pixels whose result
// is exact are printed. One pixel per clock; a watchdog ends a hung run.
module tb_hdr_image_add;
  import fp_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, z;
  fp_flags_t   f;
  int checks = 0, failures = 0;

  inexact_fp_adder dut (.a(a), .b(b), .z(z), .flags(f));

  function automatic logic [31:0] real2sp(real r);
    logic [63:0] d;
    d = $realtobits(r);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic real pixel(int img, int x, int y);
    real g, dx, dy, v;
    g  = (img == 0) ? (real'(x) + real'(y)) / real'(W + H) : real'(W - 1 - x) / real'(W);
    v  = 2.0 ** (22.0 * g - 8.0);
    dx = real'(x - W / 3 - img * W / 4);
    dy = real'(y - H / 2);
    if (dx * dx + dy * dy < real'(W * W) / 36.0) v = v * 64.0;
    v  = v * (1.0 + real'($urandom % 1000) / 4000.0);
    return v;
  endfunction

  real tr, got, rel, sum_rel, max_rel;
  int  n_exact, n_px;

  initial begin
    ref_res_t r;
    a = '0; b = '0;
    sum_rel = 0.0; max_rel = 0.0; n_exact = 0; n_px = 0;
    for (int i = 0; i < W * H; i++) begin
      begin
        int x, y;
        x = i % W;
        y = i / W;
        a = real2sp(pixel(0, x, y));
        b = real2sp(pixel(1, x, y));
        @(negedge clk);
        r = ref_add(a, b, 24, 0, 23);
        checks++;
        if (z !== r.z || f !== fp_flags_t'({r.ovf, r.unf, r.zero, r.inv})) begin
          failures++;
          if (failures < 10) $display("FAIL px(%0d,%0d) a=%h b=%h got %h exp %h", x, y, a, b, z, r.z);
        end
        tr  = sp2real(a) + sp2real(b);
        got = sp2real(z);
        rel = (tr - got) / tr;
        checks++;
        if (rel >= 0.5 || rel <= -0.5) begin
          failures++;
          if (failures < 10) $display("FAIL px(%0d,%0d) relative error %g", x, y, rel);
        end
        sum_rel += (rel < 0.0) ? -rel : rel;
        if (rel > max_rel || -rel > max_rel) max_rel = (rel < 0.0) ? -rel : rel;
        n_exact += int'(z == real2sp(tr));
        n_px++;
      end
    end
    $display("image: %0d x %0d pixels, %0d of them exact", W, H, n_exact);
    $display("relative error: mean %f, max %f", sum_rel / real'(n_px), max_rel);
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
