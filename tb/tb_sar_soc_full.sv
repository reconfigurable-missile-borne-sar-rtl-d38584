// tb_sar_soc_full: the SoC at its full default size (8K-point cores, 2048 x 8192
// MMU address space) performing one complete range-compression operation on
// one 8192-sample range line: lane 0 FFT with the matching-function multiply
// from its ACU, then lane 1 IFFT in DIT order, out through the serial port.
// The result is compared with a double-precision FFT-multiply-IFFT computed
// here, and the range line must leave in 8192 consecutive cycles.
module tb_sar_soc_full;
  import sar_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 8192, M = 13;
  localparam real PI = 3.14159265358979323846;
  localparam real P0A = 0.002, P1A = 3000.0, F0A = 0.0, DFA = 1.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hready, hreadyout, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'b010;
  logic serdes_in_valid = 1'b0, serdes_out_valid;
  cplx_t serdes_in_data = '0, serdes_out_data;
  logic mem_valid [2], mem_ready [2], mem_we [2], mem_rvalid [2];
  logic [2:0] mem_bank [2];
  logic [10:0] mem_row [2];
  logic [9:0] mem_col [2];
  cplx_t mem_wdata [2], mem_rdata [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign hready = hreadyout;

  sar_soc dut (.*);

  for (genvar m = 0; m < 2; m++) begin : g_mem
    sdram_model #(.BW(3), .ROWW(11), .COLW(10), .READ_LAT(3)) u_mem (
      .clk, .mem_valid(mem_valid[m]), .mem_ready(mem_ready[m]), .mem_we(mem_we[m]),
      .mem_bank(mem_bank[m]), .mem_row(mem_row[m]), .mem_col(mem_col[m]),
      .mem_wdata(mem_wdata[m]), .mem_rvalid(mem_rvalid[m]), .mem_rdata(mem_rdata[m]));
  end

  task automatic ahb_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b1; haddr = 32'(4 * idx);
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00; hwrite = 1'b0; hwdata = d;
    @(negedge clk);
  endtask

  // in-place radix-2 FFT on real arrays (sgn = -1 forward, +1 inverse, unscaled)
  real ar [N], ai [N];
  task automatic fft(input real sgn);
    for (int i = 0, j = 0; i < N; i++) begin
      if (i < j) begin
        real t;
        t = ar[i]; ar[i] = ar[j]; ar[j] = t;
        t = ai[i]; ai[i] = ai[j]; ai[j] = t;
      end
      begin
        int bit_v = N >> 1;
        while (j & bit_v) begin j ^= bit_v; bit_v >>= 1; end
        j |= bit_v;
      end
    end
    for (int len = 2; len <= N; len <<= 1)
      for (int s = 0; s < N; s += len)
        for (int k = 0; k < len / 2; k++) begin
          real w = sgn * 2.0 * PI * k / len, c = $cos(w), sn = $sin(w);
          real br, bi;
          br = ar[s+k+len/2] * c - ai[s+k+len/2] * sn;
          bi = ar[s+k+len/2] * sn + ai[s+k+len/2] * c;
          ar[s+k+len/2] = ar[s+k] - br; ai[s+k+len/2] = ai[s+k] - bi;
          ar[s+k] = ar[s+k] + br;       ai[s+k] = ai[s+k] + bi;
        end
  endtask

  real xr [N], xi [N];
  int n_out = 0;
  longint cyc = 0, t_first = 0, t_last = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && serdes_out_valid) begin
    checks += 2;
    if (n_out == 0) t_first = cyc;
    t_last = cyc;
    if (rabs(f2r(serdes_out_data.re) - ar[n_out]) > 2e-3 ||
        rabs(f2r(serdes_out_data.im) - ai[n_out]) > 2e-3) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample %0d: got (%f, %f) expected (%f, %f)", n_out,
                 f2r(serdes_out_data.re), f2r(serdes_out_data.im), ar[n_out], ai[n_out]);
    end
    n_out++;
  end

  initial begin
    longint t_in;
    for (int t = 0; t < N; t++) begin
      xr[t] = real'($urandom_range(2000)) / 1000.0 - 1.0;
      xi[t] = real'($urandom_range(2000)) / 1000.0 - 1.0;
      ar[t] = f2r(r2f(xr[t]));
      ai[t] = f2r(r2f(xi[t]));
    end
    // reference: FFT, phase factor p0*(f - f^2/p1) on signed bins, IFFT / N
    fft(-1.0);
    for (int k = 0; k < N; k++) begin
      real f, ph, c, s, r, i;
      f  = F0A + real'((k >= N / 2) ? k - N : k) * DFA;
      ph = P0A * (f - f * f / P1A);
      c = $cos(ph); s = $sin(ph);
      r = ar[k] * c - ai[k] * s;
      i = ar[k] * s + ai[k] * c;
      ar[k] = r; ai[k] = i;
    end
    fft(1.0);
    for (int t = 0; t < N; t++) begin ar[t] /= N; ai[t] /= N; end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ahb_write(0, 32'(M) | (32'd23 << 5));
    ahb_write(6, 32'h6F);
    ahb_write(7, r2f(P0A)); ahb_write(8, r2f(P1A)); ahb_write(9, r2f(F0A)); ahb_write(10, r2f(DFA));
    ahb_write(16, 32'(M) | 32'h10 | (32'd23 << 5) | 32'h400);
    ahb_write(11, 32'h1); ahb_write(27, 32'h1);
    ahb_write(48, 32'h041);            // lane0 <- serial, lane1 <- lane0
    ahb_write(49, 32'h200);            // serial out <- lane1
    t_in = cyc;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      serdes_in_valid = 1'b1;
      serdes_in_data  = '{re: r2f(xr[t]), im: r2f(xi[t])};
    end
    @(negedge clk) serdes_in_valid = 1'b0;
    while (n_out < N && cyc < t_in + 8 * N) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d samples out", n_out); end
    checks++;
    if (t_last - t_first != N - 1) begin
      failures++;
      $display("FAIL line left over %0d cycles", t_last - t_first + 1);
    end
    $display("8K range line: first sample out %0d cycles after first in", t_first - t_in - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
