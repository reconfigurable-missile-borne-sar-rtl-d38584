// tb_fft_core: self-checking test of the streaming FFT/IFFT core.
//
// For several lengths (even and odd powers of two, so both the radix-2 front
// stage and the radix-2^2 pairs are exercised) it streams back-to-back frames of
// random complex data, compares every output bin with a double-precision DFT
// computed here, checks that the bins come out in bit-reversed order, that
// frames leave one every N cycles (one sample per cycle), and that an inverse
// transform matches the scaled inverse DFT; DIT mode is run with bit-reversed
// input, expecting natural-order output.
module tb_fft_core;
  import sar_pkg::*;
  import tb_util_pkg::*;

  localparam int LOG2_NMAX = 6;
  localparam int FRAMES    = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [3:0] log2n = 4'd4;
  logic inv = 1'b0;
  logic dit = 1'b0;
  logic [4:0] pre = 5'd23;
  logic in_valid = 1'b0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t out_data;
  logic [LOG2_NMAX-1:0] out_idx;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fft_core #(.LOG2_NMAX(LOG2_NMAX)) dut (.*);

  real xr [FRAMES][64];
  real xi [FRAMES][64];
  int  ocount;
  longint cyc = 0, first_in, first_out [FRAMES];
  always @(posedge clk) cyc <= cyc + 1;


  function automatic int brev(input int v, input int m);
    int r = 0;
    for (int b = 0; b < m; b++) if (v[b]) r |= 1 << (m - 1 - b);
    return r;
  endfunction

  task automatic check_close(input real got, input real exp_v, input real scale, input string what);
    real err;
    err = got - exp_v;
    if (err < 0) err = -err;
    checks++;
    if (err > 2e-4 * scale) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  // collect outputs of one run and compare with the DFT (or the input for IFFT)
  task automatic run(input int m, input bit do_inv, input bit do_dit = 1'b0);
    int n = 1 << m;
    ocount = 0;
    @(negedge clk);
    log2n = 4'(m); inv = do_inv; dit = do_dit; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < n; i++) begin
        xr[f][i] = real'($urandom_range(2000)) / 1000.0 - 1.0;
        xi[f][i] = real'($urandom_range(2000)) / 1000.0 - 1.0;
      end
    fork
      begin
        for (int f = 0; f < FRAMES; f++)
          for (int i = 0; i < n; i++) begin
            if (f == 0 && i == 0) first_in = cyc;
            in_valid   = 1'b1;
            // DIT mode takes the frame in bit-reversed order
            in_data.re = r2f(xr[f][do_dit ? brev(i, m) : i]);
            in_data.im = r2f(xi[f][do_dit ? brev(i, m) : i]);
            @(negedge clk);
          end
        in_valid = 1'b0;
      end
      begin
        while (ocount < FRAMES * n) begin
          @(posedge clk);
          if (out_valid) begin
            int f, pos, k;
            real er, ei, sgn;
            f   = ocount / n;
            pos = ocount % n;
            if (pos == 0) first_out[f] = cyc;
            // bit-reversed order
            k = do_dit ? pos : brev(pos, m);
            checks++;
            if (int'(out_idx) != k) begin
              failures++;
              $display("FAIL index: got %0d expected %0d", out_idx, k);
            end
            er = 0; ei = 0;
            sgn = do_inv ? 1.0 : -1.0;
            for (int t = 0; t < n; t++) begin
              real ang = sgn * 2.0 * PI * real'(k * t % n) / real'(n);
              er += xr[f][t] * $cos(ang) - xi[f][t] * $sin(ang);
              ei += xr[f][t] * $sin(ang) + xi[f][t] * $cos(ang);
            end
            if (do_inv) begin
              er = er / n;
              ei = ei / n;
            end
            check_close(f2r(out_data.re), er, do_inv ? 1.0 : real'(n), "re");
            check_close(f2r(out_data.im), ei, do_inv ? 1.0 : real'(n), "im");
            ocount++;
          end
        end
      end
    join
    // throughput: back-to-back frames leave N cycles apart
    for (int f = 1; f < FRAMES; f++) begin
      checks++;
      if (first_out[f] - first_out[f-1] != n) begin
        failures++;
        $display("FAIL frame period %0d, expected %0d", first_out[f] - first_out[f-1], n);
      end
    end
    $display("N=%0d inv=%0d latency(first in to first out)=%0d cycles", n, do_inv,
             first_out[0] - first_in);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(4, 1'b0);
    run(5, 1'b0);
    run(6, 1'b0);
    run(3, 1'b0);
    run(5, 1'b1);
    run(6, 1'b1);
    run(5, 1'b0, 1'b1);
    run(4, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
