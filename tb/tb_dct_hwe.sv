// tb_dct_hwe: forward DCT, inverse DCT and 2x4x8 inverse DCT of random blocks,
// compared with double-precision transforms computed here from their cosine
// definitions (orthonormal; for 2x4x8 the vertical direction is a 4-point DCT of
// the line-pair sums and of the line-pair differences, each scaled by 1/sqrt(2)).
// Results must be within 1 of the rounded reference. Also checks that `done`
// comes 17 cycles after `start`.
module tb_dct_hwe;
  logic clk = 0, rst_n = 0;
  logic in_we, start, busy, done;
  logic [5:0] in_addr, rd_addr;
  logic signed [15:0] in_data, rd_data;
  logic [1:0] mode;
  real x [64], y [64], tmp [64];
  int checks = 0, failures = 0, maxerr = 0;
  localparam real PI = 3.14159265358979323846;

  dct_hwe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real c8(input int k, input int n);   // orthonormal 8-point basis
    return ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2*n + 1) * k * PI / 16.0);
  endfunction
  function automatic real c248(input int v, input int yy);  // 2x4x8 vertical basis
    int vv, z; real b;
    vv = v % 4; z = yy / 2;
    b = ((vv == 0) ? 0.5 : $sqrt(0.5)) * $cos((2*z + 1) * vv * PI / 8.0) * $sqrt(0.5);
    return (v >= 4 && yy % 2 == 1) ? -b : b;
  endfunction

  task automatic run(input int m);
    int c;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); in_we = 1; in_addr = 6'(i); in_data = 16'($rtoi(x[i]));
    end
    @(negedge clk); in_we = 0; start = 1; mode = 2'(m);
    @(negedge clk); start = 0; c = 1;
    while (!done) begin @(negedge clk); c++; end
    checks++; if (c != 17) begin failures++; $display("latency %0d", c); end
    // reference
    for (int r = 0; r < 8; r++) for (int k = 0; k < 8; k++) begin
      tmp[r*8+k] = 0;
      for (int n = 0; n < 8; n++) begin
        real cf;
        if (m == 0) cf = c8(k, n); else cf = c8(n, k);
        tmp[r*8+k] += x[r*8+n] * cf;
      end
    end
    for (int j = 0; j < 8; j++) for (int k = 0; k < 8; k++) begin
      real s; s = 0;
      for (int n = 0; n < 8; n++) begin
        real cf;
        if (m == 0) cf = c8(k, n); else if (m == 1) cf = c8(n, k); else cf = c248(n, k);
        s += tmp[n*8+j] * cf;
      end
      y[k*8+j] = s;
    end
    for (int i = 0; i < 64; i++) begin
      int e, d; real lo, hi;
      lo = (m == 0) ? -2048 : -256; hi = (m == 0) ? 2047 : 255;
      e = $rtoi((y[i] < 0) ? y[i] - 0.5 : y[i] + 0.5);
      if (e < lo) e = int'(lo); if (e > hi) e = int'(hi);
      rd_addr = 6'(i); #1;
      d = int'(rd_data) - e; if (d < 0) d = -d;
      if (d > maxerr) maxerr = d;
      checks++; if (d > 1) begin failures++; if (failures < 6) $display("mode %0d coef %0d: %0d exp %0d (%f)", m, i, rd_data, e, y[i]); end
    end
  endtask

  initial begin
    in_we = 0; start = 0; mode = 0; in_addr = 0; in_data = 0; rd_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 64; i++) begin int v; v = int'($urandom % 511) - 255; x[i] = v; end
      run(0);
      for (int i = 0; i < 64; i++) begin int v; v = int'($urandom % 401) - 200; if ($urandom % 4 != 0) v = 0; x[i] = v; end
      begin int v; v = int'($urandom % 2001) - 1000; x[0] = v; end
      run(1);
      run(2);
    end
    $display("max error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
