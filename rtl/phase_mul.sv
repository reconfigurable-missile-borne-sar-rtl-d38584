// phase_mul: complex multiplier fed by its own ACU, as drawn on each side of
// every FFT/IFFT core of the SoC.
//
// For each sample the vector generator turns the sample's index into Vec0 and
// Vec1, the ACU forms exp(j * Para0 * (Vec0 - Vec1 / Para1)), and the complex
// multiplier applies it to the sample, which travels through the vector
// generator and the ACU as payload so that it meets its own factor. With
// cfg.en low the sample passes through one register instead.
//
// Timing: one sample per cycle; latency ITER + 11 cycles when enabled, 1 when
// bypassed. Change cfg.en only while no stream is passing.
module phase_mul
  import sar_pkg::*;
#(
  parameter int IW   = 13,
  parameter int ITER = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mul_cfg_t      cfg,
  input  logic [3:0]    log2n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  cplx_t         in_data,
  output logic          out_valid,
  output cplx_t         out_data
);
  localparam int PW = $bits(cplx_t);
  logic          g_valid, a_valid, m_valid;
  fp32_t         v0, v1, c, s;
  logic [PW-1:0] g_pl, a_pl;
  cplx_t         m_data;

  vec_gen #(.IW(IW), .PW(PW)) u_vec (
    .clk, .rst_n,
    .f0(cfg.f0), .df(cfg.df), .vsel(cfg.vsel), .sgn(cfg.sgn), .log2n,
    .in_valid(in_valid && cfg.en), .in_idx, .in_payload(in_data),
    .out_valid(g_valid), .vec0(v0), .vec1(v1), .out_payload(g_pl)
  );

  acu #(.PW(PW), .CORDIC_ITER(ITER)) u_acu (
    .clk, .rst_n,
    .cfg(cfg.acu_cfg), .para0(cfg.para0), .para1(cfg.para1),
    .in_valid(g_valid), .vec0(v0), .vec1(v1), .in_payload(g_pl),
    .out_valid(a_valid), .out_cos(c), .out_sin(s), .out_payload(a_pl)
  );

  cplx_mul u_mul (
    .clk, .rst_n,
    .in_valid(a_valid), .in_a(cplx_t'(a_pl)), .in_b('{re: c, im: s}),
    .out_valid(m_valid), .out_p(m_data)
  );

  logic  b_valid;
  cplx_t b_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_valid <= 1'b0;
    else        b_valid <= in_valid && !cfg.en;
  end
  always_ff @(posedge clk) b_data <= in_data;

  assign out_valid = cfg.en ? m_valid : b_valid;
  assign out_data  = cfg.en ? m_data  : b_data;
endmodule
