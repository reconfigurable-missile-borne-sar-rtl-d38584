// tb_util_pkg: conversions between binary32 words and real numbers, written out
// with real arithmetic so that the testbenches do not depend on the
// simulator's shortreal support.
package tb_util_pkg;
  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real r);
    real a;
    int  e;
    logic [23:0] m;
    logic s;
    if (r == 0.0) return 32'd0;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = 24'($rtoi(a * 8388608.0));
    return {s, 8'(e + 127), m[22:0]};
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
endpackage
