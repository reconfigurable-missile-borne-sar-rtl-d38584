// cplx_mul: floating-point complex multiplier, (a + jb)(c + jd) = (ac - bd) + j(ad + bc).
//
// The source design places a complex multiplier on both sides of each FFT core
// to apply matching functions and phase factors; its insides are not published.
// Here it is a two-stage pipeline: the four real products are registered in the
// first stage, the subtraction and addition in the second. Arithmetic follows
// sar_pkg (binary32 layout, truncation, subnormals flushed).
//
// Timing: one product per cycle, out_valid two cycles after in_valid.
module cplx_mul
  import sar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_a,
  input  cplx_t in_b,
  output logic  out_valid,
  output cplx_t out_p
);
  fp32_t ac, bd, ad, bc;
  logic  v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    ac       <= fmul(in_a.re, in_b.re);
    bd       <= fmul(in_a.im, in_b.im);
    ad       <= fmul(in_a.re, in_b.im);
    bc       <= fmul(in_a.im, in_b.re);
    out_p.re <= fsub(ac, bd);
    out_p.im <= fadd(ad, bc);
  end
endmodule
