// cfg_regs: AHB-Lite slave holding the configuration registers that the CPU
// writes to reconfigure the IP cores and the data flow.
//
// The source design connects its CPU to the processing fabric over AHB and
// configures all core parameters from software; the register block itself is
// this design's. It holds NREG 32-bit read/write registers at word addresses
// 0 .. NREG-1 (byte address = 4 * index) and NSTAT read-only status words above
// them (byte address 4 * (NREG + i)). A write also raises wr_strobe[index] for
// one cycle, which the top uses as start pulses. Only 32-bit transfers are
// supported; responses are always OKAY with no wait states.
//
// Timing: standard AHB-Lite pipelining; the address phase is captured, the
// register is written at the end of the data phase, read data are driven during
// the data phase.
module cfg_regs #(
  parameter int NREG  = 64,
  parameter int NSTAT = 8,
  localparam int AW   = $clog2(NREG + NSTAT) + 2
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  output logic [31:0] regs      [NREG],
  output logic        wr_strobe [NREG],
  input  logic [31:0] status    [NSTAT]
);
  logic          dp_write, dp_read;
  logic [AW-3:0] dp_idx;
  logic          active;

  assign active    = hsel && hready && htrans[1];
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_read  <= 1'b0;
      dp_idx   <= '0;
    end else if (hready) begin
      dp_write <= active && hwrite;
      dp_read  <= active && !hwrite;
      dp_idx   <= haddr[AW-1:2];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      for (int i = 0; i < NREG; i++) begin
        regs[i]      <= '0;
        wr_strobe[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < NREG; i++) begin
        wr_strobe[i] <= dp_write && (int'(dp_idx) == i);
        if (dp_write && int'(dp_idx) == i) regs[i] <= hwdata;
      end
    end
  end

  always_comb begin
    hrdata = '0;
    if (dp_read) begin
      if (int'(dp_idx) < NREG)             hrdata = regs[dp_idx[$clog2(NREG)-1:0]];
      else if (int'(dp_idx) < NREG + NSTAT) hrdata = status[int'(dp_idx) - NREG];
    end
  end

  // only word transfers are supported
  a_word: assert property (@(posedge hclk) disable iff (!hresetn)
                           active |-> hsize == 3'b010);
endmodule
