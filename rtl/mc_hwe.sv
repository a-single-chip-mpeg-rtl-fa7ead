// mc_hwe: motion compensation engine of the video encode/decode MM.
// For LANES pixels per cycle it forms the prediction from the forward and/or the
// backward reference with MPEG-2 half-pixel interpolation, averages the two for
// bidirectional prediction, adds the decoded residual and clips to 0..255.
// Per lane and direction the 2x2 neighbourhood {a b; c d} of the integer-pel
// position is supplied; with half-pel flags hx, hy:
//   (0,0) a   (1,0) (a+b+1)>>1   (0,1) (a+c+1)>>1   (1,1) (a+b+c+d+2)>>2
//   bidirectional: (f + b + 1) >> 1 ; intra/no prediction: 0 (recon = residual)
// Pipeline: stage 1 interpolation, stage 2 averaging, residual add and clip;
// results 2 cycles after the inputs, one row segment per cycle.
// Half-pel interpolation, averaging and reconstruction follow MPEG-2; the lane
// count and the streaming interface are this design's choices.
module mc_hwe #(
  parameter int unsigned LANES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [1:0]        mode,      // 0 forward, 1 backward, 2 bidirectional, 3 none
  input  logic              hx_f, hy_f, hx_b, hy_b,
  input  logic [7:0]        fwd [LANES][4],
  input  logic [7:0]        bwd [LANES][4],
  input  logic signed [15:0] resid [LANES],
  output logic              out_valid,
  output logic [7:0]        pred  [LANES],
  output logic [7:0]        recon [LANES]
);
  function automatic logic [7:0] interp(input logic [7:0] p [4], input logic hx, input logic hy);
    logic [9:0] s;
    unique case ({hy, hx})
      2'b00: s = {p[0], 2'b00};
      2'b01: s = {1'b0, 9'(p[0]) + 9'(p[1]) + 9'd1} << 1;
      2'b10: s = {1'b0, 9'(p[0]) + 9'(p[2]) + 9'd1} << 1;
      default: s = 10'(p[0]) + 10'(p[1]) + 10'(p[2]) + 10'(p[3]) + 10'd2;
    endcase
    return s[9:2];
  endfunction

  logic [7:0] pf_q [LANES], pb_q [LANES];
  logic signed [15:0] res_q [LANES];
  logic [1:0] mode_q;
  logic v1, v2;

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      pf_q[l]  <= interp(fwd[l], hx_f, hy_f);
      pb_q[l]  <= interp(bwd[l], hx_b, hy_b);
      res_q[l] <= resid[l];
    end
    mode_q <= mode;
    for (int l = 0; l < LANES; l++) begin
      logic [7:0] p;
      int r;
      unique case (mode_q)
        2'd0: p = pf_q[l];
        2'd1: p = pb_q[l];
        2'd2: p = 8'((9'(pf_q[l]) + 9'(pb_q[l]) + 9'd1) >> 1);
        default: p = 8'd0;
      endcase
      r = int'(p) + int'(res_q[l]);
      pred[l]  <= p;
      recon[l] <= (r < 0) ? 8'd0 : (r > 255) ? 8'd255 : 8'(r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; end
    else begin v1 <= in_valid; v2 <= v1; end
  end
  assign out_valid = v2;
endmodule
