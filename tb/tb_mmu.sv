// tb_mmu: writes a small matrix through the MMU into the SDRAM model with range
// truncation and memory back-pressure, reads it back in sequential and in
// transposed order and checks every sample and its order, checks that each
// stored sample has its own address, and compares the page misses of a
// transposed read with the number of tiles (one page opening per tile).
module tb_mmu;
  import sar_pkg::*;
  localparam int NA_MAX = 16, NR_MAX = 32, TILE = 4, NBANK = 4;
  localparam int BW = 2, TW = 2;
  localparam int RTB  = (NR_MAX / TILE + NBANK - 1) / NBANK;
  localparam int ROWW = $clog2((NA_MAX / TILE) * RTB);
  localparam int COLW = 2 * TW;
  localparam int NA = 8, NR_IN = 32, NR_KEEP = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 1'b0;
  logic [4:0] na = 5'(NA);
  logic [5:0] nr_in = 6'(NR_IN), nr_keep = 6'(NR_KEEP);
  logic start_wr = 1'b0, start_rd = 1'b0, busy, wr_lost;
  logic wr_valid = 1'b0, wr_ready, rd_valid;
  cplx_t wr_data = '0, rd_data;
  logic mem_valid, mem_ready, mem_we, mem_rvalid;
  logic [BW-1:0] mem_bank;
  logic [ROWW-1:0] mem_row;
  logic [COLW-1:0] mem_col;
  cplx_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mmu #(.NA_MAX(NA_MAX), .NR_MAX(NR_MAX), .TILE(TILE), .NBANK(NBANK)) dut (.*);
  sdram_model #(.BW(BW), .ROWW(ROWW), .COLW(COLW), .READ_LAT(3), .STALL_EVERY(7)) mem (
    .clk, .mem_valid, .mem_ready, .mem_we, .mem_bank, .mem_row, .mem_col,
    .mem_wdata, .mem_rvalid, .mem_rdata);

  function automatic cplx_t sample(input int a, input int r);
    return '{re: 32'(a * 1000 + r), im: 32'(a * 7 + r * 13 + 5)};
  endfunction

  task automatic read_pass(input logic transposed);
    int n = 0;
    @(negedge clk);
    sel = transposed; start_rd = 1'b1;
    @(negedge clk);
    start_rd = 1'b0;
    while (n < NA * NR_KEEP) begin
      @(posedge clk);
      if (rd_valid) begin
        int a, r;
        if (transposed) begin a = n % NA; r = n / NA; end
        else            begin a = n / NR_KEEP; r = n % NR_KEEP; end
        checks++;
        if (rd_data != sample(a, r)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d element %0d: got %h expected %h", transposed, n, rd_data, sample(a, r));
        end
        n++;
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    int m0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start_wr = 1'b1;
    @(negedge clk);
    start_wr = 1'b0;
    // write pass: NA lines of NR_IN points, offered whenever the MMU is ready
    for (int a = 0; a < NA; a++)
      for (int r = 0; r < NR_IN; r++) begin
        wr_valid = 1'b1;
        wr_data  = sample(a, r);
        @(posedge clk);
        while (!wr_ready) @(posedge clk);
        @(negedge clk);
      end
    wr_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (mem.writes != NA * NR_KEEP) begin
      failures++;
      $display("FAIL %0d samples stored, expected %0d", mem.writes, NA * NR_KEEP);
    end
    // the model stalled, so samples were offered while not ready
    checks++;
    if (!wr_lost) begin failures++; $display("FAIL wr_lost not set"); end
    read_pass(1'b0);
    m0 = mem.page_misses;
    read_pass(1'b1);
    // a transposed read opens each tile's page once
    checks++;
    if (mem.page_misses - m0 > (NA / TILE) * (NR_KEEP / TILE)) begin
      failures++;
      $display("FAIL transposed read caused %0d page misses", mem.page_misses - m0);
    end
    $display("page misses: transposed read %0d for %0d tiles", mem.page_misses - m0,
             (NA / TILE) * (NR_KEEP / TILE));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
