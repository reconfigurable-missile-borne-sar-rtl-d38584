// tb_cplx_mul: random complex products against double-precision arithmetic,
// including zero operands, with the two-cycle latency checked.
module tb_cplx_mul;
  import sar_pkg::*;
  import tb_util_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_a = '0, in_b = '0;
  logic out_valid;
  cplx_t out_p;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cplx_mul dut (.*);

  real er_q [$], ei_q [$];
  int  t_q [$];

  function automatic real rnd();
    real m = real'($urandom_range(2000000)) / 1000000.0 - 1.0;
    int  e = int'($urandom_range(20)) - 10;
    if ($urandom_range(15) == 0) return 0.0;
    return m * (2.0 ** e);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real er, ei, gr, gi, tol;
      int t0;
      er = er_q.pop_front(); ei = ei_q.pop_front(); t0 = t_q.pop_front();
      gr = f2r(out_p.re); gi = f2r(out_p.im);
      tol = 1e-5 * (rabs(er) + rabs(ei) + 1e-30) + 1e-30;
      checks += 3;
      if (rabs(gr - er) > tol || rabs(gi - ei) > tol) begin
        failures++;
        $display("FAIL got (%g, %g) expected (%g, %g)", gr, gi, er, ei);
      end
      if (cyc - t0 != 2) begin
        failures++;
        $display("FAIL latency %0d", cyc - t0);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      real ar, ai, br, bi;
      @(negedge clk);
      ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
      in_a = '{re: r2f(ar), im: r2f(ai)};
      in_b = '{re: r2f(br), im: r2f(bi)};
      // reference from the rounded operands actually applied
      ar = f2r(in_a.re); ai = f2r(in_a.im); br = f2r(in_b.re); bi = f2r(in_b.im);
      in_valid = 1'b1;
      er_q.push_back(ar * br - ai * bi);
      ei_q.push_back(ar * bi + ai * br);
      t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (er_q.size() != 0) failures++;
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
