// cordic: pipelined CORDIC rotator producing cos(theta) and sin(theta).
//
// The phase is a 32-bit word counted in turns (2^32 = 2*pi). The two top bits
// fold the angle into [-pi/2, pi/2) by a rotation of pi (negate the result), and
// ITER rotation stages then drive the residual angle to zero, one micro-rotation
// per pipeline stage. The start vector is (K, 0) with K the CORDIC gain
// 0.607252935, so no correction multiply is needed. Results are signed fixed
// point with 24 fraction bits (1.0 = 2^24).
//
// The source design only names a CORDIC doing the trigonometric functions by
// pipeline operation; the iteration count, widths and folding are choices made
// here. A payload word travels alongside each phase so that callers get their
// data back aligned with its cos/sin.
//
// Timing: one phase per cycle; outputs appear ITER+1 cycles after in_valid.
// The arctangent constants are round(atan(2^-i) / (2*pi) * 2^32).
module cordic #(
  parameter int ITER = 24,
  parameter int PW   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [31:0]         in_phase,
  input  logic [PW-1:0]       in_payload,
  output logic                out_valid,
  output logic signed [25:0]  out_cos,
  output logic signed [25:0]  out_sin,
  output logic [PW-1:0]       out_payload
);
  localparam logic [31:0] ATAN [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };
  localparam logic signed [27:0] K_GAIN = 28'sd10188014;

  logic signed [27:0] x [ITER+1];
  logic signed [27:0] y [ITER+1];
  logic signed [31:0] z [ITER+1];
  logic               neg [ITER+1];
  logic               v [ITER+1];
  logic [PW-1:0]      pl [ITER+1];

  // stage 0: fold into [-pi/2, pi/2)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
    end
  end
  always_ff @(posedge clk) begin
    x[0]  <= K_GAIN;
    y[0]  <= '0;
    pl[0] <= in_payload;
    // quadrants 1 and 2 (top bits 01, 10) are rotated by pi
    if (in_phase[31] ^ in_phase[30]) begin
      neg[0] <= 1'b1;
      z[0]   <= $signed(in_phase + 32'h8000_0000);
    end else begin
      neg[0] <= 1'b0;
      z[0]   <= $signed(in_phase);
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      neg[i+1] <= neg[i];
      pl[i+1]  <= pl[i];
      if (!z[i][31]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - $signed(ATAN[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + $signed(ATAN[i]);
      end
    end
  end

  assign out_valid   = v[ITER];
  assign out_payload = pl[ITER];
  assign out_cos     = neg[ITER] ? 26'(-x[ITER]) : 26'(x[ITER]);
  assign out_sin     = neg[ITER] ? 26'(-y[ITER]) : 26'(y[ITER]);

  initial assert (ITER >= 1 && ITER <= 24) else $error("cordic: ITER must be 1..24");
endmodule
