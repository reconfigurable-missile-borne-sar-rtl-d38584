// stream_mux: configurable crossbar that steers sample streams between units.
//
// The SoC has one such switch in front of its three FFT/IFFT lanes and one
// behind them; the CPU sets which source feeds each destination and so decides
// the direction of the data flow for each processing step. Each of the NDST
// outputs takes the stream of source sel[d] (valid and data), registered once;
// a select beyond the last source gives an idle output. Several destinations may
// take the same source. The switch's existence and placement follow the source
// design; the register stage and the select encoding are this design's.
//
// Timing: one cycle from any input to the outputs.
module stream_mux
  import sar_pkg::*;
#(
  parameter int NSRC = 6,
  parameter int NDST = 3,
  localparam int SW  = $clog2(NSRC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] sel       [NDST],
  input  logic          src_valid [NSRC],
  input  cplx_t         src_data  [NSRC],
  output logic          dst_valid [NDST],
  output cplx_t         dst_data  [NDST]
);
  for (genvar d = 0; d < NDST; d++) begin : g_dst
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    dst_valid[d] <= 1'b0;
      else if (int'(sel[d]) < NSRC)  dst_valid[d] <= src_valid[sel[d]];
      else                           dst_valid[d] <= 1'b0;
    end
    always_ff @(posedge clk) begin
      if (int'(sel[d]) < NSRC) dst_data[d] <= src_data[sel[d]];
      else                     dst_data[d] <= '0;
    end
  end
endmodule
