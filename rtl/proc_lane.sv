// proc_lane: one processing lane of the SoC: a phase multiplier, an FFT/IFFT
// core and a second phase multiplier in a row, each multiplier with its ACU.
//
// The first multiplier indexes each sample by its position in the frame (its
// bit-reversed position when the core is set to DIT); the second sees the core's bit-reversed output and
// indexes each sample by its frequency bin, so a frequency-domain matching
// function is applied in the core's output order without any reordering.
// Setting cfg.inv makes the core an IFFT; either multiplier can be bypassed.
//
// Timing: frames of 2^log2n samples on consecutive cycles; one sample per
// cycle. Pulse clear after changing the configuration.
module proc_lane
  import sar_pkg::*;
#(
  parameter int LOG2_NMAX = 13,
  parameter int ITER      = 24
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  lane_cfg_t cfg,
  input  logic      in_valid,
  input  cplx_t     in_data,
  output logic      out_valid,
  output cplx_t     out_data
);
  logic [LOG2_NMAX-1:0] icnt, fidx, pidx, irev;
  logic  p_valid, f_valid;
  cplx_t p_data, f_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        icnt <= '0;
    else if (clear)    icnt <= '0;
    else if (in_valid) icnt <= icnt + 1'b1;
  end

  // index of an input sample: its position, or the bit-reversed position when
  // the core takes bit-reversed input (DIT)
  always_comb begin
    for (int i = 0; i < LOG2_NMAX; i++) irev[i] = icnt[LOG2_NMAX-1-i];
    irev = irev >> (LOG2_NMAX - int'(cfg.log2n));
    pidx = (cfg.dit ? irev : icnt) & LOG2_NMAX'((32'd1 << cfg.log2n) - 1);
  end

  phase_mul #(.IW(LOG2_NMAX), .ITER(ITER)) u_pre (
    .clk, .rst_n, .cfg(cfg.pre_mul), .log2n(cfg.log2n),
    .in_valid, .in_idx(pidx), .in_data,
    .out_valid(p_valid), .out_data(p_data)
  );

  fft_core #(.LOG2_NMAX(LOG2_NMAX), .ITER(ITER)) u_fft (
    .clk, .rst_n, .clear,
    .log2n(cfg.log2n), .inv(cfg.inv), .dit(cfg.dit), .pre(cfg.pre),
    .in_valid(p_valid), .in_data(p_data),
    .out_valid(f_valid), .out_data(f_data), .out_idx(fidx)
  );

  phase_mul #(.IW(LOG2_NMAX), .ITER(ITER)) u_post (
    .clk, .rst_n, .cfg(cfg.post_mul), .log2n(cfg.log2n),
    .in_valid(f_valid), .in_idx(fidx), .in_data(f_data),
    .out_valid, .out_data
  );
endmodule
