// quant_hwe: quantizer (Q) and inverse quantizer (IQ) of the video encode/decode MM.
// Coefficients stream in one per cycle in raster order (in_first marks coefficient
// 0 of a block) and leave one cycle later. IQ follows MPEG-2: the intra DC
// coefficient is multiplied by 8 >> intra_dc_precision; every other coefficient
// becomes ((2*QF + k) * W * qscale) / 32 (k = 0 for intra, sign(QF) otherwise,
// division truncating toward zero), saturated to [-2048, 2047], and mismatch
// control toggles the last coefficient's LSB when the block sum is even.
// Q is the encoder's choice: intra coefficients are rounded to nearest,
// (32*F +- W*qscale) / (2*W*qscale), non-intra truncated, 32*F / (2*W*qscale),
// both clipped to [-2047, 2047]; the intra DC is divided, rounded, by the DC
// multiplier. Intra and non-intra weight matrices (raster order, 8-bit) are
// loaded through w_we. Q and IQ as single-function commands follow the
// architecture; the forward rounding and the interface are this design's choices.
module quant_hwe (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               w_we,
  input  logic               w_sel,      // 0 intra, 1 non-intra matrix
  input  logic [5:0]         w_addr,
  input  logic [7:0]         w_data,
  input  logic               inv,        // 1 IQ, 0 Q
  input  logic               intra,
  input  logic [6:0]         qscale,     // quantiser_scale, 1..112
  input  logic [1:0]         dc_prec,    // intra_dc_precision
  input  logic               in_valid,
  input  logic               in_first,
  input  logic signed [15:0] in_data,
  output logic               out_valid,
  output logic signed [15:0] out_data
);
  logic [7:0] wm [2][64];
  logic [5:0] idx_q;
  logic       sum_odd_q;

  always_ff @(posedge clk) if (w_we) wm[w_sel][w_addr] <= w_data;

  logic [5:0] idx;
  assign idx = in_first ? 6'd0 : idx_q;

  function automatic int sat(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  int val;
  always_comb begin
    int x, w, dcm, k, den;
    x   = int'(in_data);
    w   = int'(wm[intra ? 0 : 1][idx]);
    dcm = 8 >> dc_prec;
    k = 0; den = 1;
    if (inv) begin
      if (intra && idx == 0) val = sat(x * dcm, -2048, 2047);
      else begin
        k = intra ? 0 : (x > 0 ? 1 : (x < 0 ? -1 : 0));
        val = sat(((2 * x + k) * w * int'(qscale)) / 32, -2048, 2047);
      end
    end else begin
      den = 2 * w * int'(qscale);
      if (den == 0) den = 1;
      if (intra && idx == 0) val = (x + (x < 0 ? -(dcm / 2) : dcm / 2)) / dcm;
      else if (intra)        val = sat((32 * x + (x < 0 ? -(den / 2) : den / 2)) / den, -2047, 2047);
      else                   val = sat((32 * x) / den, -2047, 2047);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0; sum_odd_q <= 1'b0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        logic par;
        idx_q <= idx + 6'd1;
        par = (in_first ? 1'b0 : sum_odd_q) ^ val[0];
        sum_odd_q <= par;
        if (inv && idx == 6'd63 && !par)
          out_data <= 16'(val[0] ? val - 1 : val + 1);
        else
          out_data <= 16'(val);
      end
    end
  end
endmodule
