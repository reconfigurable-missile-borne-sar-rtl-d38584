// tb_sar_soc: end-to-end run of a scaled-down range-Doppler flow through the
// SoC, configured entirely over the AHB port as the CPU would.
//
//  1. Range processing: lines from the serial input go to lane 0 (FFT, then a
//     frequency-domain phase factor from its ACU), straight on through the input
//     switch to lane 1 (IFFT in DIT mode, taking lane 0's bit-reversed output),
//     and into MMU 0, which keeps only the first NR_KEEP points of each line.
//  2. Azimuth processing: MMU 0 reads the matrix transposed (corner turn) into
//     lane 2 (phase factor from its first ACU, then an azimuth FFT), whose output
//     is stored in MMU 1 (ping-pong partner).
//  3. MMU 1 is read sequentially to the serial output.
// Every output sample is compared with the same flow computed here in double
// precision. Each mechanism (lane chaining, pre- and post-multiplier, bypassed
// multiplier, IFFT, DIT input order, odd and even transform lengths, range
// truncation, transposed read, sequential read, both memories) is counted and a
// mechanism that never occurred counts as a failure.
module tb_sar_soc;
  import sar_pkg::*;
  import tb_util_pkg::*;

  localparam int LOG2_NMAX = 5, NA_MAX = 16, NR_MAX = 32, TILE = 4, NBANK = 4;
  localparam int BW = 2, ROWW = 3, COLW = 4;
  localparam int NA = 4, NR = 32, NR_KEEP = 16;
  localparam real PI = 3.14159265358979323846;
  // phase-factor settings
  localparam real P0A = 0.5, P1A = 4.0, F0A = 0.0, DFA = 0.25;   // lane 0 post
  localparam real P0B = 0.3, F0B = 0.1, DFB = 1.0;                // lane 2 pre

  logic clk = 1'b0, rst_n = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hready, hreadyout, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'b010;
  logic serdes_in_valid = 1'b0, serdes_out_valid;
  cplx_t serdes_in_data = '0, serdes_out_data;
  logic mem_valid [2], mem_ready [2], mem_we [2], mem_rvalid [2];
  logic [BW-1:0] mem_bank [2];
  logic [ROWW-1:0] mem_row [2];
  logic [COLW-1:0] mem_col [2];
  cplx_t mem_wdata [2], mem_rdata [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign hready = hreadyout;

  sar_soc #(.LOG2_NMAX(LOG2_NMAX), .NA_MAX(NA_MAX), .NR_MAX(NR_MAX), .TILE(TILE),
            .NBANK(NBANK)) dut (.*);

  for (genvar m = 0; m < 2; m++) begin : g_mem
    sdram_model #(.BW(BW), .ROWW(ROWW), .COLW(COLW), .READ_LAT(3)) u_mem (
      .clk, .mem_valid(mem_valid[m]), .mem_ready(mem_ready[m]), .mem_we(mem_we[m]),
      .mem_bank(mem_bank[m]), .mem_row(mem_row[m]), .mem_col(mem_col[m]),
      .mem_wdata(mem_wdata[m]), .mem_rvalid(mem_rvalid[m]), .mem_rdata(mem_rdata[m]));
  end

  // ---- CPU side: AHB-Lite single transfers ----
  task automatic ahb_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b1; haddr = 32'(4 * idx);
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00; hwrite = 1'b0; hwdata = d;
    @(negedge clk);
  endtask

  task automatic ahb_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b0; haddr = 32'(4 * idx);
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
    d = hrdata;
  endtask

  task automatic wait_mmu_idle(input int m);
    logic [31:0] st;
    do begin
      repeat (8) @(negedge clk);
      ahb_read(64, st);
    end while (st[m]);
  endtask

  // ---- mechanism counters ----
  int n_chain = 0, n_lane_mul = 0, n_bypass = 0, n_trunc = 0, n_ping = 0, n_pong = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.lane_in_valid[1] && dut.in_sel[1] == 3'd4) n_chain++;
    if (dut.g_lane[0].u_lane.u_post.u_acu.out_valid) n_lane_mul++;
    if (dut.g_lane[2].u_lane.u_pre.u_acu.out_valid) n_lane_mul++;
    if (dut.g_lane[1].u_lane.u_pre.b_valid) n_bypass++;
    if (dut.g_mmu[0].u_mmu.state == 2'd1 && dut.mmu_wr_valid[0] && !mem_valid[0]) n_trunc++;
    if (mem_valid[0] && !mem_we[0]) n_ping++;
    if (mem_valid[1] && !mem_we[1]) n_pong++;
  end

  // ---- reference model ----
  real xr [NA][NR], xi [NA][NR];
  real yr [NA][NR], yi [NA][NR];
  real zr [NR_KEEP][NA], zi [NR_KEEP][NA];

  task automatic reference();
    for (int a = 0; a < NA; a++) begin
      real sr [NR], si [NR];
      for (int k = 0; k < NR; k++) begin
        real ar = 0, ai = 0, f, ph, c, s;
        for (int t = 0; t < NR; t++) begin
          real w = -2.0 * PI * real'(k * t % NR) / NR;
          ar += xr[a][t] * $cos(w) - xi[a][t] * $sin(w);
          ai += xr[a][t] * $sin(w) + xi[a][t] * $cos(w);
        end
        // post-multiplier of lane 0: signed bin, f = f0 + k*df, phase p0*(f - f^2/p1)
        f  = F0A + real'((k >= NR / 2) ? k - NR : k) * DFA;
        ph = P0A * (f - f * f / P1A);
        c = $cos(ph); s = $sin(ph);
        sr[k] = ar * c - ai * s;
        si[k] = ar * s + ai * c;
      end
      for (int t = 0; t < NR; t++) begin
        real br = 0, bi = 0;
        for (int k = 0; k < NR; k++) begin
          real w = 2.0 * PI * real'(k * t % NR) / NR;
          br += sr[k] * $cos(w) - si[k] * $sin(w);
          bi += sr[k] * $sin(w) + si[k] * $cos(w);
        end
        yr[a][t] = br / NR;
        yi[a][t] = bi / NR;
      end
    end
    for (int r = 0; r < NR_KEEP; r++) begin
      real wr [NA], wi [NA];
      for (int a = 0; a < NA; a++) begin
        real ph = P0B * (F0B + real'(a) * DFB);
        wr[a] = yr[a][r] * $cos(ph) - yi[a][r] * $sin(ph);
        wi[a] = yr[a][r] * $sin(ph) + yi[a][r] * $cos(ph);
      end
      for (int k = 0; k < NA; k++) begin
        real ar = 0, ai = 0;
        for (int a = 0; a < NA; a++) begin
          real w = -2.0 * PI * real'(k * a % NA) / NA;
          ar += wr[a] * $cos(w) - wi[a] * $sin(w);
          ai += wr[a] * $sin(w) + wi[a] * $cos(w);
        end
        zr[r][k] = ar;
        zi[r][k] = ai;
      end
    end
  endtask

  function automatic logic [31:0] fr(input real r);
    return r2f(r);
  endfunction

  int n_out = 0;
  always @(posedge clk) if (rst_n && serdes_out_valid) begin
    int r, pos, k;
    r   = n_out / NA;
    pos = n_out % NA;
    k   = {pos[0], pos[1]};          // lane 2 delivers 4-point bins bit-reversed
    checks += 2;
    if (rabs(f2r(serdes_out_data.re) - zr[r][k]) > 2e-3 ||
        rabs(f2r(serdes_out_data.im) - zi[r][k]) > 2e-3) begin
      failures++;
      if (failures < 10)
        $display("FAIL out %0d (r=%0d k=%0d): got (%f, %f) expected (%f, %f)", n_out, r, k,
                 f2r(serdes_out_data.re), f2r(serdes_out_data.im), zr[r][k], zi[r][k]);
    end
    n_out++;
  end

  task automatic count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    for (int a = 0; a < NA; a++)
      for (int t = 0; t < NR; t++) begin
        xr[a][t] = real'($urandom_range(2000)) / 1000.0 - 1.0;
        xi[a][t] = real'($urandom_range(2000)) / 1000.0 - 1.0;
      end
    reference();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // lane 0: 32-point FFT (DIF), post multiplier: full formula, Vec0 = f, Vec1 = f^2, signed bins
    ahb_write(0, 32'(5) | (32'd23 << 5));
    ahb_write(1, 32'h0);
    ahb_write(6, 32'h6F);
    ahb_write(7, fr(P0A)); ahb_write(8, fr(P1A)); ahb_write(9, fr(F0A)); ahb_write(10, fr(DFA));
    // lane 1: 32-point IFFT, DIT input order, both multipliers bypassed
    ahb_write(16, 32'(5) | 32'h10 | (32'd23 << 5) | 32'h400);
    ahb_write(17, 32'h0);
    ahb_write(22, 32'h0);
    // lane 2: 4-point FFT, pre multiplier: x = Para0 * Vec0 (acu_cfg = 100), Vec0 = f
    ahb_write(32, 32'(2) | (32'd23 << 5));
    ahb_write(33, 32'h9);
    ahb_write(34, fr(P0B)); ahb_write(35, fr(1.0)); ahb_write(36, fr(F0B)); ahb_write(37, fr(DFB));
    ahb_write(38, 32'h0);
    ahb_write(11, 32'h1); ahb_write(27, 32'h1); ahb_write(43, 32'h1);
    // switches: lane0 <- serial, lane1 <- lane0, lane2 <- MMU0; MMU0 <- lane1, MMU1 <- lane2, serial <- MMU1
    ahb_write(48, 32'h241);
    ahb_write(49, 32'h632);
    // MMU0: transposed reads, NA lines of NR points, keep NR_KEEP; MMU1: NR_KEEP lines of NA
    ahb_write(50, 32'h1); ahb_write(51, NA); ahb_write(52, (NR_KEEP << 16) | NR);
    ahb_write(54, 32'h0); ahb_write(55, NR_KEEP); ahb_write(56, (NA << 16) | NA);
    ahb_write(53, 32'h1);
    ahb_write(57, 32'h1);

    // step 1: range lines from the serial input, back to back
    for (int a = 0; a < NA; a++)
      for (int t = 0; t < NR; t++) begin
        @(negedge clk);
        serdes_in_valid = 1'b1;
        serdes_in_data  = '{re: r2f(xr[a][t]), im: r2f(xi[a][t])};
      end
    @(negedge clk) serdes_in_valid = 1'b0;
    wait_mmu_idle(0);
    // step 2: corner turn into the azimuth lane
    ahb_write(53, 32'h2);
    wait_mmu_idle(0);
    wait_mmu_idle(1);
    // step 3: image out
    ahb_write(57, 32'h2);
    wait_mmu_idle(1);
    repeat (20) @(negedge clk);

    checks++;
    if (n_out != NA * NR_KEEP) begin
      failures++;
      $display("FAIL %0d output samples, expected %0d", n_out, NA * NR_KEEP);
    end
    checks++;
    if (g_mem[0].u_mem.writes != NA * NR_KEEP || g_mem[1].u_mem.writes != NA * NR_KEEP) begin
      failures++;
      $display("FAIL stored %0d / %0d samples", g_mem[0].u_mem.writes, g_mem[1].u_mem.writes);
    end
    count("lane chaining FFT->IFFT", n_chain);
    count("ACU phase multiply", n_lane_mul);
    count("multiplier bypass", n_bypass);
    count("range truncation", n_trunc);
    count("transposed read (MMU0)", n_ping);
    count("sequential read (MMU1)", n_pong);
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
