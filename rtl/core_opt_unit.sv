// core_opt_unit: optional instructions added to the processor core of the audio MM.
// Single-cycle combinational unit for leading-zero detection, absolute difference,
// signed minimum and maximum, and clipping, used by FFT and filter code. The set of
// instructions follows the architecture; the clip forms are this design's choice:
// CLIP saturates a signed value to n+1 bits, [-2^n, 2^n-1], and CLIPU to [0, 2^n-1],
// with n from the 5-bit immediate.
module core_opt_unit (
  input  logic [2:0]  op,     // 0 LZD, 1 ABSD, 2 MIN, 3 MAX, 4 CLIP, 5 CLIPU
  input  logic [31:0] rs,
  input  logic [31:0] rt,
  input  logic [4:0]  imm,
  output logic [31:0] rd
);
  always_comb begin
    logic signed [31:0] a, b, hi, lo;
    a = signed'(rs); b = signed'(rt);
    hi = (32'sd1 <<< imm) - 32'sd1;
    lo = -(32'sd1 <<< imm);
    rd = '0;
    unique case (op)
      3'd0: begin
        rd = 32'd32;
        for (int i = 0; i < 32; i++) if (rs[i]) rd = 32'(31 - i);
      end
      3'd1: rd = (a > b) ? 32'(a - b) : 32'(b - a);
      3'd2: rd = (a < b) ? rs : rt;
      3'd3: rd = (a > b) ? rs : rt;
      3'd4: rd = (a > hi) ? hi : (a < lo) ? lo : rs;
      3'd5: rd = (a > hi) ? hi : (a < 0) ? 32'd0 : rs;
      default: rd = '0;
    endcase
  end
endmodule
