// vec_gen: generates the vectors Vec0 and Vec1 of the phase-factor formula
// from the index of each sample.
//
// The matching functions of the range-Doppler algorithm are functions of a
// frequency or time grid: a linear term (range walk, Doppler centroid) and a
// quadratic term (chirp matching, Doppler rate). For sample index n the unit
// forms the grid value f = f0 + n * df in floating point and offers
//   Vec0 = f   or f^2   (vsel[0])
//   Vec1 = f   or f^2   (vsel[1])
// With sgn set the index is read as a signed log2n-bit number, so that the upper
// half of a spectrum maps to negative frequencies. The source design says only
// that the vectors are generated directly or precomputed by rule; this grid
// generator is this design's choice of rule.
//
// Timing: pipeline of 3 cycles; a payload word travels with each index.
module vec_gen
  import sar_pkg::*;
#(
  parameter int IW = 13,
  parameter int PW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fp32_t         f0,
  input  fp32_t         df,
  input  logic [1:0]    vsel,
  input  logic          sgn,
  input  logic [3:0]    log2n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  logic [PW-1:0] in_payload,
  output logic          out_valid,
  output fp32_t         vec0,
  output fp32_t         vec1,
  output logic [PW-1:0] out_payload
);
  logic signed [31:0] n;
  fp32_t         s1_nf, s2_f, s3_f, s3_f2;
  logic [2:0]    vld;
  logic [PW-1:0] pl [3];

  always_comb begin
    n = 32'(in_idx);
    if (sgn && in_idx[log2n - 4'd1]) n = n - (32'sd1 <<< log2n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s1_nf <= fix2f(n, 0);
    s2_f  <= fadd(f0, fmul(s1_nf, df));
    s3_f  <= s2_f;
    s3_f2 <= fmul(s2_f, s2_f);
    pl[0] <= in_payload;
    pl[1] <= pl[0];
    pl[2] <= pl[1];
  end

  assign out_valid   = vld[2];
  assign vec0        = vsel[0] ? s3_f2 : s3_f;
  assign vec1        = vsel[1] ? s3_f2 : s3_f;
  assign out_payload = pl[2];
endmodule
