// sar_soc: reconfigurable SAR imaging datapath for a range-Doppler imaging flow.
//
// Three processing lanes (FFT, IFFT, FFT by their role in the flow; each core
// can be set to either direction) sit between two crossbar switches. Every lane
// is multiplier -> FFT/IFFT core -> multiplier, and each multiplier has its own
// arithmetic acceleration unit (ACU) that generates the phase factors of the
// matching functions, six of each in all. Two memory management units, each
// with its own external SDRAM, store the intermediate matrices in ping-pong
// fashion and perform the corner turn between range and azimuth processing.
// Samples enter and leave through the ports of the serial links. A CPU
// reconfigures everything over an AHB-Lite port between processing steps;
// the sample stream itself never passes through it.
//
// Input switch sources : 0 idle, 1 serial in, 2 MMU0 read, 3 MMU1 read,
//                        4..6 lane 0..2 output
// Input switch outputs : lane 0, lane 1, lane 2
// Output switch sources: 0 idle, 1..3 lane 0..2 output, 4 serial in,
//                        5 MMU0 read, 6 MMU1 read
// Output switch outputs: MMU0 write, MMU1 write, serial out
//
// Register map (32-bit words, byte address = 4 * index), lane c at 16*c:
//   +0  {dit[10], pre[9:5], inv[4], log2n[3:0]}   +6 post multiplier control
//   +1  pre multiplier control: en[0], acu_cfg[3:1], vsel[5:4], sgn[6]
//   +2..+5  pre  Para0, Para1, f0, df        +7..+10 post Para0, Para1, f0, df
//   +11 any write clears the lane (pulse)
//   48  input switch selects  {lane2[11:8], lane1[7:4], lane0[3:0]}
//   49  output switch selects {serial[11:8], mmu1[7:4], mmu0[3:0]}
//   50 + 4*m, MMU m: +0 sel[0]; +1 na; +2 {nr_keep[31:16], nr_in[15:0]};
//                    +3 command: bit0 start write pass, bit1 start read pass
//   status word 0 (index 64): {wr_lost1, wr_lost0, busy1, busy0}
//
// The lane count, the multiplier/ACU placement, the two MMUs with two SDRAMs,
// the switches and the AHB link follow the source design's architecture; the
// register map, switch encodings and port shapes are this design's own.
module sar_soc
  import sar_pkg::*;
#(
  parameter int LOG2_NMAX = 13,
  parameter int ITER      = 24,
  parameter int NA_MAX    = 2048,
  parameter int NR_MAX    = 8192,
  parameter int TILE      = 32,
  parameter int NBANK     = 8,
  localparam int BW       = $clog2(NBANK),
  localparam int TW       = $clog2(TILE),
  localparam int RTB      = (NR_MAX / TILE + NBANK - 1) / NBANK,
  localparam int ROWW     = $clog2((NA_MAX / TILE) * RTB),
  localparam int COLW     = 2 * TW
) (
  input  logic            clk,
  input  logic            rst_n,
  // AHB-Lite slave port for the CPU
  input  logic            hsel,
  input  logic [31:0]     haddr,
  input  logic [1:0]      htrans,
  input  logic            hwrite,
  input  logic [2:0]      hsize,
  input  logic [31:0]     hwdata,
  input  logic            hready,
  output logic            hreadyout,
  output logic            hresp,
  output logic [31:0]     hrdata,
  // serial link, parallel side
  input  logic            serdes_in_valid,
  input  cplx_t           serdes_in_data,
  output logic            serdes_out_valid,
  output cplx_t           serdes_out_data,
  // two external SDRAMs
  output logic            mem_valid  [2],
  input  logic            mem_ready  [2],
  output logic            mem_we     [2],
  output logic [BW-1:0]   mem_bank   [2],
  output logic [ROWW-1:0] mem_row    [2],
  output logic [COLW-1:0] mem_col    [2],
  output cplx_t           mem_wdata  [2],
  input  logic            mem_rvalid [2],
  input  cplx_t           mem_rdata  [2]
);
  localparam int NREG = 64;
  localparam int AAW  = $clog2(NA_MAX);
  localparam int RAW  = $clog2(NR_MAX);

  logic [31:0] regs   [NREG];
  logic        wstb   [NREG];
  logic [31:0] status [1];

  cfg_regs #(.NREG(NREG), .NSTAT(1)) u_regs (
    .hclk(clk), .hresetn(rst_n),
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .regs, .wr_strobe(wstb), .status
  );

  function automatic mul_cfg_t mul_cfg(input logic [31:0] ctl, input logic [31:0] p0,
                                       input logic [31:0] p1, input logic [31:0] f0,
                                       input logic [31:0] df);
    mul_cfg_t m;
    m.en      = ctl[0];
    m.acu_cfg = ctl[3:1];
    m.vsel    = ctl[5:4];
    m.sgn     = ctl[6];
    m.para0   = p0;
    m.para1   = p1;
    m.f0      = f0;
    m.df      = df;
    return m;
  endfunction

  // ---- lanes ----
  logic  lane_in_valid  [3];
  cplx_t lane_in_data   [3];
  logic  lane_out_valid [3];
  cplx_t lane_out_data  [3];

  for (genvar c = 0; c < 3; c++) begin : g_lane
    localparam int B = 16 * c;
    lane_cfg_t cfg;
    assign cfg.log2n    = regs[B][3:0];
    assign cfg.inv      = regs[B][4];
    assign cfg.pre      = regs[B][9:5];
    assign cfg.dit      = regs[B][10];
    assign cfg.pre_mul  = mul_cfg(regs[B+1], regs[B+2], regs[B+3], regs[B+4], regs[B+5]);
    assign cfg.post_mul = mul_cfg(regs[B+6], regs[B+7], regs[B+8], regs[B+9], regs[B+10]);

    proc_lane #(.LOG2_NMAX(LOG2_NMAX), .ITER(ITER)) u_lane (
      .clk, .rst_n,
      .clear    (wstb[B+11]),
      .cfg,
      .in_valid (lane_in_valid[c]),
      .in_data  (lane_in_data[c]),
      .out_valid(lane_out_valid[c]),
      .out_data (lane_out_data[c])
    );
  end

  // ---- MMUs ----
  logic  mmu_wr_valid [2];
  cplx_t mmu_wr_data  [2];
  logic  mmu_rd_valid [2];
  cplx_t mmu_rd_data  [2];
  logic  mmu_busy     [2];
  logic  mmu_lost     [2];

  for (genvar m = 0; m < 2; m++) begin : g_mmu
    localparam int B = 50 + 4 * m;
    logic wr_ready;
    mmu #(.NA_MAX(NA_MAX), .NR_MAX(NR_MAX), .TILE(TILE), .NBANK(NBANK)) u_mmu (
      .clk, .rst_n,
      .sel      (regs[B][0]),
      .na       ((AAW+1)'(regs[B+1])),
      .nr_in    ((RAW+1)'(regs[B+2][15:0])),
      .nr_keep  ((RAW+1)'(regs[B+2][31:16])),
      .start_wr (wstb[B+3] && regs[B+3][0]),
      .start_rd (wstb[B+3] && regs[B+3][1]),
      .busy     (mmu_busy[m]),
      .wr_lost  (mmu_lost[m]),
      .wr_valid (mmu_wr_valid[m]),
      .wr_data  (mmu_wr_data[m]),
      .wr_ready,
      .rd_valid (mmu_rd_valid[m]),
      .rd_data  (mmu_rd_data[m]),
      .mem_valid(mem_valid[m]),
      .mem_ready(mem_ready[m]),
      .mem_we   (mem_we[m]),
      .mem_bank (mem_bank[m]),
      .mem_row  (mem_row[m]),
      .mem_col  (mem_col[m]),
      .mem_wdata(mem_wdata[m]),
      .mem_rvalid(mem_rvalid[m]),
      .mem_rdata(mem_rdata[m])
    );
  end

  assign status[0] = {28'd0, mmu_lost[1], mmu_lost[0], mmu_busy[1], mmu_busy[0]};

  // ---- switches ----
  logic  in_src_valid  [7];
  cplx_t in_src_data   [7];
  logic  out_src_valid [7];
  cplx_t out_src_data  [7];
  logic [2:0] in_sel  [3];
  logic [2:0] out_sel [3];
  logic  out_dst_valid [3];
  cplx_t out_dst_data  [3];

  always_comb begin
    in_src_valid[0] = 1'b0;              in_src_data[0] = '0;
    in_src_valid[1] = serdes_in_valid;   in_src_data[1] = serdes_in_data;
    in_src_valid[2] = mmu_rd_valid[0];   in_src_data[2] = mmu_rd_data[0];
    in_src_valid[3] = mmu_rd_valid[1];   in_src_data[3] = mmu_rd_data[1];
    out_src_valid[0] = 1'b0;             out_src_data[0] = '0;
    for (int c = 0; c < 3; c++) begin
      in_src_valid[4+c]  = lane_out_valid[c];  in_src_data[4+c]  = lane_out_data[c];
      out_src_valid[1+c] = lane_out_valid[c];  out_src_data[1+c] = lane_out_data[c];
    end
    out_src_valid[4] = serdes_in_valid;  out_src_data[4] = serdes_in_data;
    out_src_valid[5] = mmu_rd_valid[0];  out_src_data[5] = mmu_rd_data[0];
    out_src_valid[6] = mmu_rd_valid[1];  out_src_data[6] = mmu_rd_data[1];
    for (int d = 0; d < 3; d++) begin
      in_sel[d]  = regs[48][4*d +: 3];
      out_sel[d] = regs[49][4*d +: 3];
    end
  end

  stream_mux #(.NSRC(7), .NDST(3)) u_in_mux (
    .clk, .rst_n, .sel(in_sel),
    .src_valid(in_src_valid), .src_data(in_src_data),
    .dst_valid(lane_in_valid), .dst_data(lane_in_data)
  );

  stream_mux #(.NSRC(7), .NDST(3)) u_out_mux (
    .clk, .rst_n, .sel(out_sel),
    .src_valid(out_src_valid), .src_data(out_src_data),
    .dst_valid(out_dst_valid), .dst_data(out_dst_data)
  );

  assign mmu_wr_valid[0]  = out_dst_valid[0];
  assign mmu_wr_data[0]   = out_dst_data[0];
  assign mmu_wr_valid[1]  = out_dst_valid[1];
  assign mmu_wr_data[1]   = out_dst_data[1];
  assign serdes_out_valid = out_dst_valid[2];
  assign serdes_out_data  = out_dst_data[2];
endmodule
