// tb_acu: drives the ACU with random scalars and vectors under each switch
// setting and compares cos/sin with double-precision evaluation of
// exp(j * Para0 * (Vec0 - Vec1 / Para1)) (or the reduced forms); also checks the
// payload alignment and the latency.
module tb_acu;
  import sar_pkg::*;
  import tb_util_pkg::*;
  localparam int LAT = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] cfg = 3'b111;
  fp32_t para0 = '0, para1 = '0, vec0 = '0, vec1 = '0;
  logic in_valid = 1'b0;
  logic [15:0] in_payload = '0, out_payload;
  logic out_valid;
  fp32_t out_cos, out_sin;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  acu #(.PW(16)) dut (.*);

  real x_q [$];
  int  t_q [$];
  int  id_q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real x, gc, gs;
      int t0, id;
      x = x_q.pop_front(); t0 = t_q.pop_front(); id = id_q.pop_front();
      gc = f2r(out_cos); gs = f2r(out_sin);
      checks += 3;
      if (rabs(gc - $cos(x)) > 2e-4 || rabs(gs - $sin(x)) > 2e-4) begin
        failures++;
        $display("FAIL id=%0d cfg=%0d x=%f cos %f (exp %f) sin %f (exp %f)", id, cfg, x, gc, $cos(x), gs, $sin(x));
      end
      if (cyc - t0 != LAT) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      if (int'(out_payload) != id) begin failures++; $display("FAIL payload"); end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      in_valid = 1'b0;
      repeat (LAT + 2) @(negedge clk);
      cfg = 3'(c);
      repeat (LAT + 2) @(negedge clk);
      // the scalars are static configuration during a stream
      para0 = r2f(real'($urandom_range(2000)) / 1000.0 - 1.0);
      para1 = r2f(real'($urandom_range(1000)) / 250.0 + 0.5);
      for (int i = 0; i < 100; i++) begin
        real p0, p1, v0, v1, q, d, x;
        v0 = real'($urandom_range(2000)) / 200.0 - 5.0;
        v1 = real'($urandom_range(2000)) / 200.0 - 5.0;
        vec0 = r2f(v0); vec1 = r2f(v1);
        p0 = f2r(para0); p1 = f2r(para1); v0 = f2r(vec0); v1 = f2r(vec1);
        q = !cfg[1] ? 0.0 : (cfg[0] ? v1 / p1 : v1);
        d = v0 - q;
        x = cfg[2] ? p0 * d : d;
        in_valid = 1'b1;
        in_payload = 16'(i + 100 * c);
        if (i == 0) $display("batch %0d p0=%h p1=%h v0=%h v1=%h", c, para0, para1, vec0, vec1);
        x_q.push_back(x); t_q.push_back(cyc); id_q.push_back(i + 100 * c);
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (x_q.size() != 0) failures++;
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
