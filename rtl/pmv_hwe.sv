// pmv_hwe: predictive motion vector engine of the video encode/decode MM.
// It reconstructs one MPEG-2 motion vector component per request from the decoded
// motion_code and motion_residual, the f_code and the stored predictor (PMV), as
// the MPEG-2 standard prescribes: the difference is rebuilt from code and residual,
// added to the predictor and wrapped into [-16*f, 16*f-1] (f = 2^(f_code-1)); the
// result becomes the new predictor. For field vectors in frame pictures (`fld`,
// vertical component) the predictor is halved before use and the vector doubled
// when stored back. Predictors are held for [r][s][t] = first/second vector,
// forward/backward, horizontal/vertical; `reset_pmv` clears all eight (at slice
// start and intra macroblocks). The engine exists to speed up MP@HL decoding; its
// interface and the one-cycle result (registered) are this design's choices.
module pmv_hwe (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reset_pmv,
  input  logic              req,
  input  logic              r_idx,     // first (0) / second (1) vector
  input  logic              s_idx,     // forward (0) / backward (1)
  input  logic              t_idx,     // horizontal (0) / vertical (1)
  input  logic              fld,       // field vector in a frame picture
  input  logic [3:0]        f_code,
  input  logic signed [5:0] motion_code,
  input  logic [7:0]        motion_residual,
  output logic              valid,
  output logic signed [15:0] vector
);
  logic signed [15:0] pmv [2][2][2];

  function automatic logic signed [15:0] recon(
      input logic signed [15:0] pred, input logic [3:0] fc,
      input logic signed [5:0] code, input logic [7:0] resid);
    int rsz, f, delta, v;
    rsz = (fc == 0) ? 0 : int'(fc) - 1;
    f = 1 << rsz;
    if (f == 1 || code == 0) delta = int'(code);
    else begin
      delta = ((code < 0 ? -int'(code) : int'(code)) - 1) * f + int'(resid) + 1;
      if (code < 0) delta = -delta;
    end
    v = int'(pred) + delta;
    if (v < -16*f)      v = v + 32*f;
    else if (v > 16*f-1) v = v - 32*f;
    return 16'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; vector <= '0;
      for (int r = 0; r < 2; r++) for (int s = 0; s < 2; s++) for (int t = 0; t < 2; t++) pmv[r][s][t] <= '0;
    end else begin
      valid <= req;
      if (reset_pmv) begin
        for (int r = 0; r < 2; r++) for (int s = 0; s < 2; s++) for (int t = 0; t < 2; t++) pmv[r][s][t] <= '0;
      end else if (req) begin
        logic signed [15:0] p, v;
        p = pmv[r_idx][s_idx][t_idx];
        if (fld && t_idx) p = p >>> 1;
        v = recon(p, f_code, motion_code, motion_residual);
        vector <= v;
        pmv[r_idx][s_idx][t_idx] <= (fld && t_idx) ? 16'(v <<< 1) : v;
      end
    end
  end
endmodule
