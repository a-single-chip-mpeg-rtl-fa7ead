// simd_uci: user custom SIMD instructions of the video encode/decode MM core.
// A single-cycle combinational unit with two 32-bit register operands and a 16-bit
// sub-opcode/immediate, the format user custom instructions are limited to. It
// provides parallel add/subtract (4 bytes or 2 halfwords, wrap-around), parallel
// shifts of halfwords, parallel set-less-than (signed, all-ones lane when true),
// logical operations, a byte shuffle, and the motion-vector encoding step of
// MPEG-2: a motion vector difference is wrapped into the range allowed by f_code
// and split into motion_code and motion_residual.
// Operation list follows the architecture; opcodes, lane forms and the immediate
// layout are this design's choices.
//   BSHUF : rd byte i = rs byte imm[2i+1:2i]
//   MVENC : rs[15:0] = signed difference, imm[3:0] = f_code (1..9);
//           rd = {motion_residual[15:0], motion_code (signed)[15:0]}
module simd_uci (
  input  logic [3:0]  op,
  input  logic [31:0] rs,
  input  logic [31:0] rt,
  input  logic [15:0] imm,
  output logic [31:0] rd
);
  typedef enum logic [3:0] {
    PADDB, PADDH, PSUBB, PSUBH, PSLLH, PSRLH, PSRAH, PSLTB, PSLTH,
    LAND, LOR, LXOR, LNOR, BSHUF, MVENC
  } op_e;

  function automatic logic [31:0] mv_encode(input logic [15:0] diff, input logic [3:0] fcode);
    int f, rsz, d, ad, code, res;
    rsz = (fcode == 0) ? 0 : int'(fcode) - 1;
    f = 1 << rsz;
    d = int'($signed(diff));
    if (d > 16*f - 1) d = d - 32*f;
    if (d < -16*f)    d = d + 32*f;
    code = 0; res = 0;
    if (d != 0) begin
      ad   = (d < 0) ? -d : d;
      code = ((ad - 1) >> rsz) + 1;
      res  = (ad - 1) & (f - 1);
      if (d < 0) code = -code;
    end
    return {res[15:0], code[15:0]};
  endfunction

  always_comb begin
    rd = '0;
    unique case (op_e'(op))
      PADDB: for (int i = 0; i < 4; i++) rd[8*i +: 8]   = rs[8*i +: 8] + rt[8*i +: 8];
      PADDH: for (int i = 0; i < 2; i++) rd[16*i +: 16] = rs[16*i +: 16] + rt[16*i +: 16];
      PSUBB: for (int i = 0; i < 4; i++) rd[8*i +: 8]   = rs[8*i +: 8] - rt[8*i +: 8];
      PSUBH: for (int i = 0; i < 2; i++) rd[16*i +: 16] = rs[16*i +: 16] - rt[16*i +: 16];
      PSLLH: for (int i = 0; i < 2; i++) rd[16*i +: 16] = rs[16*i +: 16] << imm[3:0];
      PSRLH: for (int i = 0; i < 2; i++) rd[16*i +: 16] = rs[16*i +: 16] >> imm[3:0];
      PSRAH: for (int i = 0; i < 2; i++) rd[16*i +: 16] = 16'($signed(rs[16*i +: 16]) >>> imm[3:0]);
      PSLTB: for (int i = 0; i < 4; i++)
               rd[8*i +: 8] = ($signed(rs[8*i +: 8]) < $signed(rt[8*i +: 8])) ? 8'hFF : 8'h00;
      PSLTH: for (int i = 0; i < 2; i++)
               rd[16*i +: 16] = ($signed(rs[16*i +: 16]) < $signed(rt[16*i +: 16])) ? 16'hFFFF : 16'h0000;
      LAND:  rd = rs & rt;
      LOR:   rd = rs | rt;
      LXOR:  rd = rs ^ rt;
      LNOR:  rd = ~(rs | rt);
      BSHUF: for (int i = 0; i < 4; i++) rd[8*i +: 8] = rs[8*imm[2*i +: 2] +: 8];
      MVENC: rd = mv_encode(rs[15:0], imm[3:0]);
      default: rd = '0;
    endcase
  end
endmodule
