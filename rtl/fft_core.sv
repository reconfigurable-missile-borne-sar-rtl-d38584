// fft_core: reconfigurable floating-point streaming FFT/IFFT, mixed radix-2/4.
//
// The transform length N = 2^log2n (up to 2^LOG2_NMAX = 8K points, the longest
// transform of the range-Doppler flow), the direction (FFT or IFFT) and the
// precision are set at run time, so one core can serve the 8K, 4K and 2K
// transforms of every processing step.
//
// Structure: a single-path delay-feedback pipeline. When log2n is odd a radix-2
// butterfly (bf0) with an N/2-deep feedback memory and a full twiddle multiplier
// come first. Then follow radix-2^2 pairs (bf1, bf2 in the source design's
// drawing): two radix-2 SDF butterflies with delays L/2 and L/4 and a trivial
// -j rotation between them, then a twiddle multiplier for the pair. Pair k works
// on blocks of L = 4^(P-k); pairs whose L exceeds the current transform length
// are bypassed. Decimation in frequency: input in natural order, output in
// bit-reversed order; out_idx gives the frequency bin of each output sample.
// The inverse transform conjugates all twiddles and scales by 1/N (an exponent
// subtraction), so IFFT(FFT(x)) = x.
//
// Interface: in_valid/in_data, one sample per cycle; a frame of N samples must
// arrive on consecutive cycles, frames may follow back to back. Pulse clear
// before changing log2n or inv. Throughput: one frame every N cycles.
// `pre` keeps that many of the 23 stored mantissa bits after each butterfly.
//
// DIT/DIF selection: with dit set the core takes its input in bit-reversed
// order and delivers natural order, so a transform can directly follow another
// core's bit-reversed output (FFT -> multiply -> IFFT without a corner buffer).
// This design realises that with bit-reversal reorder buffers (bitrev_buf) on
// both sides of the same decimation-in-frequency pipeline, which adds 2*(N+1)
// cycles of latency in that mode; in DIF mode they are single registers.
module fft_core
  import sar_pkg::*;
#(
  parameter int LOG2_NMAX = 13,
  parameter int ITER      = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [3:0]           log2n,
  input  logic                 inv,
  input  logic                 dit,
  input  logic [4:0]           pre,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [LOG2_NMAX-1:0] out_idx
);
  localparam int P      = LOG2_NMAX / 2;                       // radix-2^2 pairs
  localparam int MODD   = (LOG2_NMAX % 2 == 1) ? LOG2_NMAX : LOG2_NMAX - 1;
  localparam int MAXD0  = 1 << (MODD - 1);                     // bf0 depth

  logic  odd;
  assign odd = log2n[0];

  // ---- DIT mode: bit-reversed input back to natural order ----
  logic  vr;
  cplx_t dr;

  bitrev_buf #(.LOG2_NMAX(LOG2_NMAX)) u_rin (
    .clk, .rst_n, .clear,
    .bypass (!dit),
    .log2n,
    .in_valid, .in_data,
    .out_valid(vr), .out_data(dr)
  );

  // ---- bf0 and its twiddle ----
  logic  v0, vt0;
  cplx_t d0, dt0;

  fft_bf #(.MAXD(MAXD0)) u_bf0 (
    .clk, .rst_n, .clear,
    .bypass (!odd),
    .log2d  (log2n - 4'd1),
    .mj_en  (1'b0),
    .inv, .pre,
    .in_valid(vr), .in_data(dr),
    .out_valid(v0), .out_data(d0)
  );

  fft_twiddle #(.ITER(ITER)) u_tw0 (
    .clk, .rst_n, .clear,
    .bypass (!odd),
    .r4     (1'b0),
    .log2l  (log2n),
    .inv,
    .in_valid(v0), .in_data(d0),
    .out_valid(vt0), .out_data(dt0)
  );

  // ---- radix-2^2 pairs ----
  logic  pv [P+1];
  cplx_t pd [P+1];
  assign pv[0] = vt0;
  assign pd[0] = dt0;

  for (genvar k = 0; k < P; k++) begin : g_pair
    localparam int LG = 2 * (P - k);           // log2 of the block length L
    logic  act;
    logic  va, vb;
    cplx_t da, db;
    assign act = (LG <= int'(log2n));

    fft_bf #(.MAXD(1 << (LG - 1))) u_bfi (
      .clk, .rst_n, .clear,
      .bypass (!act),
      .log2d  (4'(LG - 1)),
      .mj_en  (1'b0),
      .inv, .pre,
      .in_valid(pv[k]), .in_data(pd[k]),
      .out_valid(va), .out_data(da)
    );
    fft_bf #(.MAXD(1 << (LG - 2))) u_bfii (
      .clk, .rst_n, .clear,
      .bypass (!act),
      .log2d  (4'(LG - 2)),
      .mj_en  (1'b1),
      .inv, .pre,
      .in_valid(va), .in_data(da),
      .out_valid(vb), .out_data(db)
    );
    if (k < P - 1) begin : g_tw
      fft_twiddle #(.ITER(ITER)) u_tw (
        .clk, .rst_n, .clear,
        .bypass (!act),
        .r4     (1'b1),
        .log2l  (4'(LG)),
        .inv,
        .in_valid(vb), .in_data(db),
        .out_valid(pv[k+1]), .out_data(pd[k+1])
      );
    end else begin : g_last
      assign pv[k+1] = vb;
      assign pd[k+1] = db;
    end
  end

  // ---- DIT mode: bit-reversed result to natural order ----
  logic  vo;
  cplx_t dout;

  bitrev_buf #(.LOG2_NMAX(LOG2_NMAX)) u_rout (
    .clk, .rst_n, .clear,
    .bypass (!dit),
    .log2n,
    .in_valid(pv[P]), .in_data(pd[P]),
    .out_valid(vo), .out_data(dout)
  );

  // ---- output: inverse scaling and bin index ----
  logic [LOG2_NMAX-1:0] ocnt, rev;
  always_comb begin
    for (int i = 0; i < LOG2_NMAX; i++) rev[i] = ocnt[LOG2_NMAX-1-i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ocnt      <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      ocnt      <= '0;
    end else begin
      out_valid <= vo;
      if (vo) ocnt <= ocnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    out_data.re <= inv ? fscale_down(dout.re, {1'b0, log2n}) : dout.re;
    out_data.im <= inv ? fscale_down(dout.im, {1'b0, log2n}) : dout.im;
    out_idx     <= (dit ? ocnt : (rev >> (LOG2_NMAX - int'(log2n))))
                   & LOG2_NMAX'((32'd1 << log2n) - 1);
  end

  initial assert (LOG2_NMAX >= 3 && LOG2_NMAX <= 14)
    else $error("fft_core: LOG2_NMAX must be 3..14");
endmodule
