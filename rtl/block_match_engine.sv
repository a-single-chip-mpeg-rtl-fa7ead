// block_match_engine: one 8x8-pixel block-matching unit of the motion estimation MM.
// Each cycle it accepts a target block and a candidate reference block (64 pixels
// each) and, three cycles later, delivers their sum of absolute differences, so it
// has one-cycle throughput as a pipelined SIMD structure. A signed dc offset (the
// difference between the mean level of the current and of the reference picture)
// is subtracted from every pixel difference, so fades do not mislead the search:
//   SAD = sum |cur - ref - dc_off|.
// Pipeline: stage 1 the 64 absolute differences, stage 2 eight row sums, stage 3
// the total. The 8x8 size, one-cycle throughput and dc compensation follow the
// architecture; the three-stage split and the tag that travels with each block are
// this design's choices.
module block_match_engine #(
  parameter int unsigned TAGW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAGW-1:0]   in_tag,
  input  logic [7:0]        cur [64],
  input  logic [7:0]        ref_px [64],
  input  logic signed [8:0] dc_off,
  output logic              out_valid,
  output logic [TAGW-1:0]   out_tag,
  output logic [15:0]       sad
);
  logic [9:0]  ad_q  [64];
  logic [12:0] row_q [8];
  logic [2:0]  v_q;
  logic [TAGW-1:0] t_q [3];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 64; i++) begin
      logic signed [10:0] d;
      d = 11'(signed'({1'b0, cur[i]})) - 11'(signed'({1'b0, ref_px[i]})) - 11'(dc_off);
      ad_q[i] <= d[10] ? 10'(-d) : 10'(d);
    end
    for (int r = 0; r < 8; r++) begin
      logic [12:0] s;
      s = '0;
      for (int c = 0; c < 8; c++) s = s + 13'(ad_q[r*8+c]);
      row_q[r] <= s;
    end
    begin
      logic [15:0] t;
      t = '0;
      for (int r = 0; r < 8; r++) t = t + 16'(row_q[r]);
      sad <= t;
    end
    t_q[0] <= in_tag;
    t_q[1] <= t_q[0];
    t_q[2] <= t_q[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[1:0], in_valid};
  end

  assign out_valid = v_q[2];
  assign out_tag   = t_q[2];
endmodule
