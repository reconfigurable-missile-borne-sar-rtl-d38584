// tb_cfg_regs: AHB-Lite master tasks write random values to every register,
// including back-to-back pipelined writes, read them back, read the status
// words, and check the one-cycle write strobes.
module tb_cfg_regs;
  localparam int NREG = 16, NSTAT = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hready;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'b010;
  logic hreadyout, hresp;
  logic [31:0] regs [NREG];
  logic wr_strobe [NREG];
  logic [31:0] status [NSTAT];
  int checks = 0, failures = 0;
  int strobes [NREG];
  always #5 clk = ~clk;
  assign hready = hreadyout;

  cfg_regs #(.NREG(NREG), .NSTAT(NSTAT)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .haddr, .htrans, .hwrite, .hsize,
    .hwdata, .hready, .hreadyout, .hresp, .hrdata, .regs, .wr_strobe, .status);

  always @(posedge clk)
    if (rst_n) for (int i = 0; i < NREG; i++) if (wr_strobe[i]) strobes[i]++;

  logic [31:0] model [NREG];

  // pipelined writes: address phase of i+1 overlaps data phase of i
  task automatic write_burst(input int first, input int n);
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      if (i > 0) begin
        hwdata = $urandom;
        model[first + i - 1] = hwdata;
      end
      if (i < n) begin
        hsel = 1'b1; htrans = 2'b10; hwrite = 1'b1; haddr = 32'(4 * (first + i));
      end else begin
        hsel = 1'b0; htrans = 2'b00; hwrite = 1'b0;
      end
    end
  endtask

  task automatic read(input int idx, output logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b10; hwrite = 1'b0; haddr = 32'(4 * idx);
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
    d = hrdata;
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < NREG; i++) strobes[i] = 0;
    status[0] = 32'hCAFE_0001;
    status[1] = 32'h1234_5678;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    write_burst(0, NREG);
    write_burst(3, 2);
    for (int i = 0; i < NREG; i++) begin
      read(i, d);
      checks++;
      if (d != model[i] || regs[i] != model[i]) begin
        failures++;
        $display("FAIL reg %0d: read %h port %h expected %h", i, d, regs[i], model[i]);
      end
      checks++;
      if (strobes[i] != ((i == 3 || i == 4) ? 2 : 1)) begin
        failures++;
        $display("FAIL reg %0d strobes %0d", i, strobes[i]);
      end
    end
    for (int i = 0; i < NSTAT; i++) begin
      read(NREG + i, d);
      checks++;
      if (d != status[i]) begin failures++; $display("FAIL status %0d: %h", i, d); end
    end
    checks++;
    if (hresp != 1'b0 || hreadyout != 1'b1) failures++;
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
