// audio_vliw_cop: the VLIW coprocessor of the audio MM.
// In VLIW mode each instruction word can carry a core instruction and one
// coprocessor instruction; this unit executes the coprocessor slot. It holds eight
// 32-bit registers and two 64-bit accumulators, and has a 32-bit ALU, a shifter
// (including a funnel shift across two registers) and a 32x32-bit signed
// multiply-accumulator, plus leading-zero detect, absolute difference, min/max and
// clipping. A core general-purpose register can replace the first operand
// (`use_core`), which is how the core's registers feed the MAC, and `ld_data`
// brings a coprocessor load from the data RAM (address generated by the core).
// Every operation completes in one cycle; results are written at the clock edge.
// The register and accumulator counts and the operation list follow the
// architecture; opcodes, operand fields, the single-cycle MAC and the saturating
// accumulator read (MFA) are this design's choices.
//   MFA: rd = saturate32(acc >>> sa)
module audio_vliw_cop (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [4:0]  op,
  input  logic [2:0]  rd,
  input  logic [2:0]  rs,
  input  logic [2:0]  rt,
  input  logic        acc,
  input  logic [5:0]  sa,
  input  logic        use_core,
  input  logic [31:0] gpr_in,
  input  logic [31:0] ld_data,
  output logic [31:0] gpr_out,     // value of register rs, for the core
  output logic [63:0] acc_out [2]
);
  typedef enum logic [4:0] {
    C_ADD, C_SUB, C_AND, C_OR, C_XOR, C_SLL, C_SRL, C_SRA, C_FSH,
    C_MUL, C_MULA, C_MADD, C_MSUB, C_MFA, C_CLRA,
    C_LZD, C_ABSD, C_MIN, C_MAX, C_CLIP, C_MTC, C_LD
  } cop_e;

  logic [31:0] r [8];
  logic [63:0] a [2];
  logic [31:0] opa, opb, opt_res;
  logic signed [63:0] prod;

  assign opa  = use_core ? gpr_in : r[rs];
  assign opb  = r[rt];
  assign prod = 64'($signed(opa)) * 64'($signed(opb));
  assign gpr_out = r[rs];
  assign acc_out = a;

  logic [2:0] opt_op;
  always_comb begin
    unique case (cop_e'(op))
      C_LZD:  opt_op = 3'd0;
      C_ABSD: opt_op = 3'd1;
      C_MIN:  opt_op = 3'd2;
      C_MAX:  opt_op = 3'd3;
      default: opt_op = 3'd4;
    endcase
  end
  core_opt_unit u_opt (.op(opt_op), .rs(opa), .rt(opb), .imm(sa[4:0]), .rd(opt_res));

  function automatic logic [31:0] sat32(input logic signed [63:0] v);
    if (v > 64'sh7FFF_FFFF)  return 32'h7FFF_FFFF;
    if (v < -64'sh8000_0000) return 32'h8000_0000;
    return v[31:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
      a[0] <= '0; a[1] <= '0;
    end else if (valid) begin
      unique case (cop_e'(op))
        C_ADD:  r[rd] <= opa + opb;
        C_SUB:  r[rd] <= opa - opb;
        C_AND:  r[rd] <= opa & opb;
        C_OR:   r[rd] <= opa | opb;
        C_XOR:  r[rd] <= opa ^ opb;
        C_SLL:  r[rd] <= opa << sa[4:0];
        C_SRL:  r[rd] <= opa >> sa[4:0];
        C_SRA:  r[rd] <= 32'($signed(opa) >>> sa[4:0]);
        C_FSH:  r[rd] <= 32'({opa, opb} >> sa[4:0]);
        C_MUL:  r[rd] <= prod[31:0];
        C_MULA: a[acc] <= prod;
        C_MADD: a[acc] <= a[acc] + prod;
        C_MSUB: a[acc] <= a[acc] - prod;
        C_MFA:  r[rd] <= sat32($signed(a[acc]) >>> sa);
        C_CLRA: a[acc] <= '0;
        C_LZD, C_ABSD, C_MIN, C_MAX, C_CLIP: r[rd] <= opt_res;
        C_MTC:  r[rd] <= gpr_in;
        C_LD:   r[rd] <= ld_data;
        default: ;
      endcase
    end
  end
endmodule
