// mmu: memory management unit between the processing lanes and one external SDRAM.
//
// The SAR data cube is a matrix of NA azimuth lines by NR range points, one
// 64-bit complex sample per point. The MMU writes it line by line and reads it
// back either in the same order (sequential mode, SEL = 0, the first storage
// node of the range-Doppler flow) or column by column (transposed mode, SEL = 1,
// the corner turn before the azimuth transforms). On writing it can keep only
// the first nr_keep points of each line of nr_in points, which is the range
// truncation from 8K to 4K points.
//
// Bank interleaving: the matrix is cut into TILE x TILE tiles and each tile
// fills one SDRAM row (page), so a run along a line and a run down a column both
// stay inside an open page for TILE samples. Tile (ta, tr) goes to bank
// (ta + tr) mod NBANK, so consecutive tiles in either direction fall in
// different banks and one bank can be opened while another streams. Mapping:
//   bank = (ta + tr) mod NBANK
//   row  = ta * ceil(NR_MAX/TILE/NBANK) + tr / NBANK
//   col  = (a mod TILE) * TILE + (r mod TILE)
// The source design gives the modes, the SEL port and the interleaving among
// sub-blocks; the tile mapping, the handshake and the sizes are this design's.
//
// Interface: start_wr begins a write pass that takes NA * nr_in samples on
// wr_valid/wr_data (wr_ready follows mem_ready); start_rd begins a read pass
// that issues NA * nr_keep reads in the selected order; read data come back on
// rd_valid/rd_data in request order from the memory. The memory side is a
// command stream (mem_valid/mem_ready, mem_we, bank/row/col, mem_wdata) with read
// data returned on mem_rvalid/mem_rdata. busy is high during a pass; wr_lost is
// a sticky flag for samples offered while the memory was not ready. The data
// paths carry no logic: rd_valid/rd_data are wired straight from mem_rvalid/
// mem_rdata and mem_wdata straight from wr_data; the MMU only orders addresses.
module mmu
  import sar_pkg::*;
#(
  parameter int NA_MAX = 2048,
  parameter int NR_MAX = 8192,
  parameter int TILE   = 32,
  parameter int NBANK  = 8,
  localparam int AAW   = $clog2(NA_MAX),
  localparam int RAW   = $clog2(NR_MAX),
  localparam int BW    = $clog2(NBANK),
  localparam int TW    = $clog2(TILE),
  localparam int RTB   = (NR_MAX / TILE + NBANK - 1) / NBANK,   // rows per tile line
  localparam int ROWW  = $clog2((NA_MAX / TILE) * RTB),
  localparam int COLW  = 2 * TW
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            sel,        // 0 sequential, 1 transposed read
  input  logic [AAW:0]    na,         // azimuth lines
  input  logic [RAW:0]    nr_in,      // points per incoming line
  input  logic [RAW:0]    nr_keep,    // points kept per line
  input  logic            start_wr,
  input  logic            start_rd,
  output logic            busy,
  output logic            wr_lost,
  // stream side
  input  logic            wr_valid,
  input  cplx_t           wr_data,
  output logic            wr_ready,
  output logic            rd_valid,
  output cplx_t           rd_data,
  // SDRAM side
  output logic            mem_valid,
  input  logic            mem_ready,
  output logic            mem_we,
  output logic [BW-1:0]   mem_bank,
  output logic [ROWW-1:0] mem_row,
  output logic [COLW-1:0] mem_col,
  output cplx_t           mem_wdata,
  input  logic            mem_rvalid,
  input  cplx_t           mem_rdata
);
  typedef enum logic [1:0] {IDLE, WRITE, READ} state_t;
  state_t state;

  logic [AAW:0] a;          // azimuth line index
  logic [RAW:0] r;          // range point index
  logic         last_a, last_r, keep, step;

  assign last_a = (a == na - 1'b1);
  assign last_r = (state == WRITE) ? (r == nr_in - 1'b1) : (r == nr_keep - 1'b1);
  assign keep   = (r < nr_keep);

  // address mapping of element (a, r)
  logic [AAW-TW:0] ta;
  logic [RAW-TW:0] tr;
  always_comb begin
    ta        = (AAW-TW+1)'(a >> TW);
    tr        = (RAW-TW+1)'(r >> TW);
    mem_bank  = BW'((32'(ta) + 32'(tr)) % NBANK);
    mem_row   = ROWW'(32'(ta) * RTB + 32'(tr) / NBANK);
    mem_col   = {a[TW-1:0], r[TW-1:0]};
    mem_wdata = wr_data;
    mem_we    = (state == WRITE);
    mem_valid = (state == WRITE) ? (wr_valid && keep) : (state == READ);
    wr_ready  = (state == WRITE) && (mem_ready || !keep);
    step      = (state == WRITE) ? (wr_valid && wr_ready) : (state == READ && mem_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      a       <= '0;
      r       <= '0;
      wr_lost <= 1'b0;
    end else begin
      if (state == WRITE && wr_valid && !wr_ready) wr_lost <= 1'b1;
      case (state)
        IDLE: begin
          a <= '0;
          r <= '0;
          if (start_wr)      state <= WRITE;
          else if (start_rd) state <= READ;
        end
        default: begin
          if (step) begin
            // write passes and sequential reads walk along lines,
            // transposed reads walk down columns
            if (state == READ && sel) begin
              if (last_a) begin
                a <= '0;
                r <= r + 1'b1;
                if (last_r) state <= IDLE;
              end else begin
                a <= a + 1'b1;
              end
            end else begin
              if (last_r) begin
                r <= '0;
                a <= a + 1'b1;
                if (last_a) state <= IDLE;
              end else begin
                r <= r + 1'b1;
              end
            end
          end
        end
      endcase
    end
  end

  assign busy     = (state != IDLE);
  assign rd_valid = mem_rvalid;
  assign rd_data  = mem_rdata;

  // the configured matrix must fit the address space
  property p_size;
    @(posedge clk) disable iff (!rst_n)
      (start_wr || start_rd) |-> (na <= (AAW+1)'(NA_MAX) && nr_keep <= nr_in && nr_in <= (RAW+1)'(NR_MAX));
  endproperty
  a_size: assert property (p_size);
endmodule
