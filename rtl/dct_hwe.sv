// dct_hwe: transform engine of the video encode/decode MM.
// Besides its use inside macroblock commands, it runs as single-function commands:
// 8x8 forward DCT, 8x8 inverse DCT, and the 2x4x8 inverse DCT of DV, whose
// vertical direction is two 4-point transforms on the sum and the difference of
// the two fields' lines. All three are orthonormal separable transforms:
//   pass 1 (8 cycles): each row is transformed horizontally (8-point),
//   pass 2 (8 cycles): each column is transformed vertically (8-point, or 2x4 for
//   the DV mode). Each cycle computes one 8-point 1-D transform with 64 multiplies.
// Coefficients are cos(m*pi/16)/2 in 1.14 fixed point; pass 1 keeps 3 fraction bits,
// pass 2 rounds to integers. FDCT results are clipped to [-2048, 2047], IDCT results
// to [-256, 255]. Load the block through in_we/in_addr/in_data (raster order,
// row = addr[5:3]), pulse `start` with `mode`, wait for `done` (17 cycles after
// start), and read results through rd_addr/rd_data.
// The three transform modes follow the architecture; the fixed-point format and
// interface are this design's choices.
module dct_hwe (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_we,
  input  logic [5:0]         in_addr,
  input  logic signed [15:0] in_data,
  input  logic               start,
  input  logic [1:0]         mode,     // 0 FDCT, 1 IDCT, 2 IDCT 2x4x8
  output logic               busy,
  output logic               done,
  input  logic [5:0]         rd_addr,
  output logic signed [15:0] rd_data
);
  // 8192*cos(m*pi/16), m = 0..7
  localparam int KC [8] = '{8192, 8035, 7568, 6811, 5793, 4551, 3135, 1598};

  function automatic int cosv(input int m0);
    int m, s;
    m = m0 % 32; s = 1;
    if (m > 16) m = 32 - m;
    if (m > 8) begin m = 16 - m; s = -1; end
    if (m == 8) return 0;
    return s * KC[m];
  endfunction
  // 8-point DCT basis: row k, sample n
  function automatic int a8(input int k, input int n);
    return (k == 0) ? KC[4] : cosv((2*n + 1) * k);
  endfunction
  // 2x4x8 vertical basis: coefficient v, line y
  function automatic int b248(input int v, input int y);
    int vv, z, val;
    vv = v % 4; z = y / 2;
    val = (vv == 0) ? KC[4] : cosv(2 * vv * (2*z + 1));
    return (v >= 4 && (y % 2) == 1) ? -val : val;
  endfunction

  logic signed [15:0] blk [64];
  logic signed [31:0] tmp [64];
  logic signed [15:0] res [64];
  logic [1:0] mode_q;
  logic [4:0] step;      // 0..7 rows, 8..15 columns

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; step <= '0; mode_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; step <= '0; mode_q <= mode;
      end else if (busy) begin
        step <= step + 5'd1;
        if (step == 5'd15) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_we && !busy) blk[in_addr] <= in_data;
    if (busy && step < 5'd8) begin
      int i;
      i = int'(step[2:0]);
      for (int k = 0; k < 8; k++) begin
        longint s;
        s = 0;
        for (int n = 0; n < 8; n++)
          s += longint'(blk[i*8 + n]) * longint'((mode_q == 2'd0) ? a8(k, n) : a8(n, k));
        tmp[i*8 + k] <= 32'((s + 64'sd1024) >>> 11);
      end
    end
    if (busy && step >= 5'd8) begin
      int j;
      j = int'(step[2:0]);
      for (int k = 0; k < 8; k++) begin
        longint s, r, lo, hi;
        s = 0;
        for (int n = 0; n < 8; n++) begin
          int c;
          unique case (mode_q)
            2'd0:    c = a8(k, n);
            2'd2:    c = b248(n, k);
            default: c = a8(n, k);
          endcase
          s += longint'(tmp[n*8 + j]) * longint'(c);
        end
        r = (s + 64'sd65536) >>> 17;
        lo = (mode_q == 2'd0) ? -2048 : -256;
        hi = (mode_q == 2'd0) ?  2047 :  255;
        if (r < lo) r = lo;
        if (r > hi) r = hi;
        res[k*8 + j] <= 16'(r);
      end
    end
  end

  assign rd_data = res[rd_addr];
endmodule
