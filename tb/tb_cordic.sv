// tb_cordic: checks the CORDIC rotator against double-precision cos/sin for
// random phases over the full circle, checks that the payload stays with its
// phase and that results appear ITER+1 cycles after the input.
module tb_cordic;
  localparam int ITER = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_phase = '0;
  logic [15:0] in_payload = '0;
  logic out_valid;
  logic signed [25:0] out_cos, out_sin;
  logic [15:0] out_payload;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic #(.ITER(ITER), .PW(16)) dut (.*);

  logic [31:0] ph_q [$];
  int sent_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] ph;
      real a, ec, es, dc, ds;
      int t0;
      ph = ph_q.pop_front();
      t0 = sent_cyc.pop_front();
      a  = 2.0 * PI * real'(ph) / 4294967296.0;
      ec = $cos(a) * 16777216.0;
      es = $sin(a) * 16777216.0;
      dc = real'(out_cos) - ec;
      ds = real'(out_sin) - es;
      checks += 3;
      if (dc > 64.0 || dc < -64.0 || ds > 64.0 || ds < -64.0) begin
        failures++;
        $display("FAIL phase %h: cos %0d (exp %f) sin %0d (exp %f)", ph, out_cos, ec, out_sin, es);
      end
      if (out_payload != ph[31:16]) begin
        failures++;
        $display("FAIL payload");
      end
      if (cyc - t0 != ITER + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - t0);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_phase = (i < 8) ? 32'(i) << 29 : $urandom;
      in_payload = in_phase[31:16];
      if (in_valid) begin
        ph_q.push_back(in_phase);
        sent_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (ITER + 5) @(negedge clk);
    checks++;
    if (ph_q.size() != 0) failures++;
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
