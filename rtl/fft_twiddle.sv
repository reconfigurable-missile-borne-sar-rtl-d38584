// fft_twiddle: twiddle-factor multiplier between SDF butterfly stages.
//
// It counts the samples of the stream and works out the exponent e of the
// twiddle W_L^e = exp(-j*2*pi*e/L) (conjugated when inv is set) for each one:
//   radix-2 stage (r4 = 0): blocks of L, the second half n = L/2..L-1 gets
//                           e = n - L/2, the first half e = 0;
//   radix-2^2 pair (r4 = 1): blocks of L in four quarters g = 0..3, sample n of
//                           quarter g gets e = n * bitrev2(g) = n * {0,2,1,3}.
// The factor comes from a CORDIC (no twiddle ROM), is converted to floating
// point and applied with a complex multiplier; the data ride through the CORDIC
// as payload so that they meet their factor. With bypass set the unit is one
// register.
//
// Timing: one sample per cycle, latency ITER+4 cycles (1 when bypassed).
module fft_twiddle
  import sar_pkg::*;
#(
  parameter int ITER = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        bypass,
  input  logic        r4,
  input  logic [3:0]  log2l,
  input  logic        inv,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data
);
  logic [13:0] cnt, e, n, mask;
  logic [1:0]  g, gr;
  logic [31:0] phase;
  logic        c_valid, f_valid, m_valid;
  logic signed [25:0] c_cos, c_sin;
  cplx_t       c_data, f_data, w, m_data;

  always_comb begin
    if (r4) begin
      mask = 14'((32'd1 << (log2l - 4'd2)) - 1);
      g    = 2'(cnt >> (log2l - 4'd2));
      gr   = {g[0], g[1]};
      n    = cnt & mask;
      e    = 14'(n * gr);
    end else begin
      mask = 14'((32'd1 << (log2l - 4'd1)) - 1);
      g    = {1'b0, cnt[log2l - 4'd1]};
      gr   = g;
      n    = cnt & mask;
      e    = g[0] ? n : '0;
    end
    phase = 32'({18'd0, e} << (6'd32 - {2'b0, log2l}));
    if (!inv) phase = -phase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (clear)   cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  cordic #(.ITER(ITER), .PW($bits(cplx_t))) u_cordic (
    .clk, .rst_n,
    .in_valid   (in_valid && !bypass),
    .in_phase   (phase),
    .in_payload (in_data),
    .out_valid  (c_valid),
    .out_cos    (c_cos),
    .out_sin    (c_sin),
    .out_payload(c_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f_valid <= 1'b0;
    else        f_valid <= c_valid;
  end
  always_ff @(posedge clk) begin
    w.re   <= fix2f(32'(c_cos), 24);
    w.im   <= fix2f(32'(c_sin), 24);
    f_data <= c_data;
  end

  cplx_mul u_mul (
    .clk, .rst_n,
    .in_valid (f_valid),
    .in_a     (f_data),
    .in_b     (w),
    .out_valid(m_valid),
    .out_p    (m_data)
  );

  // bypass path: one register
  logic  b_valid;
  cplx_t b_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_valid <= 1'b0;
    else        b_valid <= in_valid && bypass;
  end
  always_ff @(posedge clk) b_data <= in_data;

  assign out_valid = bypass ? b_valid : m_valid;
  assign out_data  = bypass ? b_data  : m_data;
endmodule
