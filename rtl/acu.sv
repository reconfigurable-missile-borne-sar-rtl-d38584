// acu: arithmetic acceleration unit, generates the phase factor
//   exp(j * Para0 * (Vec0 - Vec1 / Para1))
// that every matching function of the range-Doppler algorithm reduces to.
//
// Para0 and Para1 are scalars precomputed by the CPU; Vec0 and Vec1 are vectors
// streamed in one element per cycle. Following the source design the unit holds
// a floating-point divider, adder, multiplier and a CORDIC, and configuration
// bits choose how they are connected. The bit meanings are this design's own:
//   cfg[0] = 1 : divide Vec1 by Para1       (0: use Vec1 as it is)
//   cfg[1] = 1 : subtract the Vec1 term     (0: the term is zero)
//   cfg[2] = 1 : multiply by Para0          (0: multiplier bypassed)
// With cfg = 3'b111 the full formula (1) is computed. The phase (in radians) is
// turned into a fraction of a turn by a multiply with 1/(2*pi) and wrapped to a
// 32-bit phase word for the CORDIC, whose cos/sin come back as floating point.
//
// Para0, Para1 and cfg are static settings while a stream passes.
// A payload word travels with each element so that the caller receives its data
// aligned with the factor. Timing: one factor per cycle, latency CORDIC_ITER + 6
// cycles (30 with the default 24 iterations).
module acu
  import sar_pkg::*;
#(
  parameter int PW = 1,
  parameter int CORDIC_ITER = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    cfg,
  input  fp32_t         para0,
  input  fp32_t         para1,
  input  logic          in_valid,
  input  fp32_t         vec0,
  input  fp32_t         vec1,
  input  logic [PW-1:0] in_payload,
  output logic          out_valid,
  output fp32_t         out_cos,
  output fp32_t         out_sin,
  output logic [PW-1:0] out_payload
);
  // stage 1: divide
  fp32_t         s1_v0, s1_q;
  // stage 2: subtract
  fp32_t         s2_d;
  // stage 3: multiply by Para0
  fp32_t         s3_x;
  // stage 4: radians to turns
  fp32_t         s4_t;
  logic [3:0]    vld;
  logic [PW-1:0] pl [4];
  logic          c_valid;
  logic signed [25:0] c_cos, c_sin;
  logic [PW-1:0] c_pl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s1_v0    <= vec0;
    s1_q     <= !cfg[1] ? FP_ZERO : (cfg[0] ? fdiv(vec1, para1) : vec1);
    s2_d     <= fsub(s1_v0, s1_q);
    s3_x     <= cfg[2] ? fmul(para0, s2_d) : s2_d;
    s4_t     <= fmul(s3_x, FP_INV_2PI);
    pl[0]    <= in_payload;
    for (int i = 1; i < 4; i++) pl[i] <= pl[i-1];
  end

  cordic #(.ITER(CORDIC_ITER), .PW(PW)) u_cordic (
    .clk, .rst_n,
    .in_valid   (vld[3]),
    .in_phase   (f2turn(s4_t)),
    .in_payload (pl[3]),
    .out_valid  (c_valid),
    .out_cos    (c_cos),
    .out_sin    (c_sin),
    .out_payload(c_pl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c_valid;
  end
  always_ff @(posedge clk) begin
    out_cos     <= fix2f(32'(c_cos), 24);
    out_sin     <= fix2f(32'(c_sin), 24);
    out_payload <= c_pl;
  end
endmodule
