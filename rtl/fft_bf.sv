// fft_bf: one single-path delay-feedback (SDF) radix-2 butterfly stage.
//
// A stream of frames enters one sample per cycle. The stage works in periods of
// 2*D samples: during the first D samples it parks the inputs in a D-deep
// feedback memory and sends out what the memory returns (the differences of the
// previous period); during the next D samples it combines each input b with the
// parked sample a, sends a+b on and parks a-b. This is the bf0/bf1/bf2 structure
// with a feedback SRAM and the -1 branch that the source design draws for its
// mixed radix-2/4 FFT.
//
// With mj_en set the stage is the second butterfly of a radix-2^2 pair: in the
// second half of every 4*D block the incoming sample is first multiplied by -j
// (by +j when inv is set), the trivial twiddle that makes the pair radix-4.
// Output mantissas are cut to `pre` bits (precision control). With bypass set
// the stage is a single register, which is how shorter transforms skip stages.
//
// Timing: the memory delay line advances every cycle, so a frame must enter on
// consecutive cycles; gaps are allowed between frames. Because of that, the
// parked differences of a period always leave in the D cycles right after it,
// and a down-counter (drain) marks them valid, so the memory needs no valid
// bits. The stage adds one register. Every valid sample is counted, so `clear` must be pulsed whenever
// the length changes.
module fft_bf
  import sar_pkg::*;
#(
  parameter int MAXD = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        bypass,
  input  logic [3:0]  log2d,     // runtime D = 2^log2d, D <= MAXD
  input  logic        mj_en,
  input  logic        inv,
  input  logic [4:0]  pre,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data
);
  localparam int AW = (MAXD > 1) ? $clog2(MAXD) : 1;

  cplx_t       mem  [MAXD];
  logic [AW-1:0] ptr, last;
  logic [13:0] cnt;
  logic        second, quad;
  cplx_t       a, b, fifo_q, sum, dif;
  logic [AW:0] drain;     // differences still to leave the memory
  logic        at_end;

  assign last   = AW'((32'd1 << log2d) - 1);
  assign fifo_q = mem[ptr];
  assign at_end = ((cnt & 14'((32'd1 << log2d) - 1)) == 14'(last));
  assign second = cnt[log2d];
  assign quad   = cnt[log2d + 4'd1];

  always_comb begin
    a = fifo_q;
    b = in_data;
    if (mj_en && quad) b = inv ? cmul_mj(cmul_mj(cmul_mj(in_data))) : cmul_mj(in_data);
    sum = cadd(a, b);
    dif = csub(a, b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      cnt       <= '0;
      drain     <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      ptr       <= '0;
      cnt       <= '0;
      drain     <= '0;
      out_valid <= 1'b0;
    end else begin
      ptr <= (ptr == last) ? '0 : ptr + 1'b1;
      if (in_valid) cnt <= cnt + 1'b1;
      if (bypass) begin
        out_valid <= in_valid;
      end else if (in_valid && second) begin
        out_valid <= 1'b1;
        if (at_end) drain <= (AW+1)'(last) + 1'b1;
      end else begin
        out_valid <= (drain != 0);
        if (drain != 0) drain <= drain - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (bypass) begin
      out_data <= in_data;
    end else if (in_valid && second) begin
      out_data.re <= fround(sum.re, pre);
      out_data.im <= fround(sum.im, pre);
      mem[ptr]    <= '{re: fround(dif.re, pre), im: fround(dif.im, pre)};
    end else begin
      out_data    <= fifo_q;
      mem[ptr]    <= in_data;
    end
  end

  initial assert (MAXD >= 1) else $error("fft_bf: MAXD must be at least 1");
endmodule
