// sdram_model: behavioural model of one external SDRAM on the MMU's command
// stream, for simulation only (not synthesizable intent). Storage is sparse.
// Reads return in order READ_LAT cycles after they are accepted. ready drops
// for one cycle every STALL_EVERY commands (0: never) to exercise back-pressure.
// It counts page misses: a command whose row differs from the row last opened
// in its bank.
module sdram_model
  import sar_pkg::*;
#(
  parameter int BW = 2,
  parameter int ROWW = 4,
  parameter int COLW = 4,
  parameter int READ_LAT = 3,
  parameter int STALL_EVERY = 0,
  parameter int NB = 1 << BW
) (
  input  logic            clk,
  input  logic            mem_valid,
  output logic            mem_ready,
  input  logic            mem_we,
  input  logic [BW-1:0]   mem_bank,
  input  logic [ROWW-1:0] mem_row,
  input  logic [COLW-1:0] mem_col,
  input  cplx_t           mem_wdata,
  output logic            mem_rvalid,
  output cplx_t           mem_rdata
);
  cplx_t store [longint];
  longint open_row [NB];
  int page_misses = 0, commands = 0, writes = 0;
  logic  rv [READ_LAT];
  cplx_t rd [READ_LAT];
  int cnt = 0;

  initial begin
    for (int i = 0; i < NB; i++) open_row[i] = -1;
    for (int i = 0; i < READ_LAT; i++) rv[i] = 1'b0;
  end

  assign mem_ready  = (STALL_EVERY == 0) || (cnt % STALL_EVERY != STALL_EVERY - 1);
  assign mem_rvalid = rv[READ_LAT-1];
  assign mem_rdata  = rd[READ_LAT-1];

  always @(posedge clk) begin
    longint key;
    key = {mem_bank, mem_row, mem_col};
    for (int i = READ_LAT - 1; i > 0; i--) begin
      rv[i] <= rv[i-1];
      rd[i] <= rd[i-1];
    end
    rv[0] <= 1'b0;
    cnt <= cnt + 1;
    if (mem_valid && mem_ready) begin
      commands++;
      if (open_row[mem_bank] != longint'(mem_row)) begin
        page_misses++;
        open_row[mem_bank] = longint'(mem_row);
      end
      if (mem_we) begin
        if (store.exists(key)) $display("sdram_model: address %h written twice", key);
        store[key] = mem_wdata;
        writes++;
      end else begin
        rv[0] <= 1'b1;
        rd[0] <= store.exists(key) ? store[key] : '0;
      end
    end
  end
endmodule
