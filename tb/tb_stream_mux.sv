// tb_stream_mux: random source streams and random select settings; every
// destination must show, one cycle later, the stream of the source it selects,
// or nothing for an out-of-range select.
module tb_stream_mux;
  import sar_pkg::*;
  localparam int NSRC = 6, NDST = 3, SW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [SW-1:0] sel [NDST];
  logic src_valid [NSRC];
  cplx_t src_data [NSRC];
  logic dst_valid [NDST];
  cplx_t dst_data [NDST];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  stream_mux #(.NSRC(NSRC), .NDST(NDST)) dut (.*);

  logic  exp_v [NDST];
  cplx_t exp_d [NDST];

  initial begin
    for (int d = 0; d < NDST; d++) sel[d] = '0;
    for (int s = 0; s < NSRC; s++) begin src_valid[s] = 1'b0; src_data[s] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int s = 0; s < NSRC; s++) begin
        src_valid[s] = 1'($urandom);
        src_data[s]  = {$urandom, $urandom};
      end
      if (i % 10 == 0)
        for (int d = 0; d < NDST; d++) sel[d] = SW'($urandom_range(NSRC));
      for (int d = 0; d < NDST; d++) begin
        exp_v[d] = (int'(sel[d]) < NSRC) ? src_valid[sel[d]] : 1'b0;
        exp_d[d] = (int'(sel[d]) < NSRC) ? src_data[sel[d]] : '0;
      end
      @(posedge clk);
      #1;
      for (int d = 0; d < NDST; d++) begin
        checks++;
        if (dst_valid[d] != exp_v[d] || (exp_v[d] && dst_data[d] != exp_d[d])) begin
          failures++;
          $display("FAIL dst %0d sel %0d", d, sel[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
