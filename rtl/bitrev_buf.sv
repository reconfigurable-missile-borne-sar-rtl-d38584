// bitrev_buf: streaming bit-reversal reorder buffer with a single N-word memory.
//
// Frame k is written while frame k-1 is read out, through the same address:
// each step reads the word at the address and then overwrites it with the
// incoming sample. The address sequence alternates between natural order and
// bit-reversed order from one frame to the next; because bit reversal is its own
// inverse, the output frame is always the input frame in bit-reversed order.
// After the last frame of a burst the buffer keeps stepping for N cycles on its
// own (drain) so that the frame still inside comes out.
//
// Timing: output lags input by N+1 cycles; one sample per cycle. A frame must
// arrive on consecutive cycles and must start either right after the previous
// frame or once the drain has finished. With bypass set it is one register.
// Pulse clear after changing log2n.
module bitrev_buf
  import sar_pkg::*;
#(
  parameter int LOG2_NMAX = 13
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       bypass,
  input  logic [3:0] log2n,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data
);
  localparam int NMAX = 1 << LOG2_NMAX;

  cplx_t                mem [NMAX];
  logic [LOG2_NMAX-1:0] pos, rev, addr, last;
  logic [LOG2_NMAX:0]   drain;
  logic                 mode, cur_valid, have_prev, step;

  always_comb begin
    for (int i = 0; i < LOG2_NMAX; i++) rev[i] = pos[LOG2_NMAX-1-i];
    rev  = rev >> (LOG2_NMAX - int'(log2n));
    last = LOG2_NMAX'((32'd1 << log2n) - 1);
    addr = mode ? rev : pos;
    step = !bypass && (in_valid || drain != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; drain <= '0; mode <= 1'b0; cur_valid <= 1'b0; have_prev <= 1'b0;
      out_valid <= 1'b0;
    end else if (clear) begin
      pos <= '0; drain <= '0; mode <= 1'b0; cur_valid <= 1'b0; have_prev <= 1'b0;
      out_valid <= 1'b0;
    end else if (bypass) begin
      out_valid <= in_valid;
    end else begin
      out_valid <= step && have_prev;
      if (step) begin
        if (drain != 0) drain <= drain - 1'b1;
        if (pos == '0) cur_valid <= in_valid;
        if (pos == last) begin
          pos       <= '0;
          mode      <= ~mode;
          have_prev <= (pos == '0) ? in_valid : cur_valid;
          if ((pos == '0) ? in_valid : cur_valid) drain <= (LOG2_NMAX+1)'(last) + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (bypass) begin
      out_data <= in_data;
    end else if (step) begin
      out_data  <= mem[addr];
      mem[addr] <= in_data;
    end
  end

  // a frame may not start in the middle of a drain
  a_frame_start: assert property (@(posedge clk) disable iff (!rst_n || clear || bypass)
                                  (in_valid && drain != 0 && pos != '0) |-> cur_valid);
endmodule
