// me_fine_hwe: fine-grain motion estimation engine of the video encode/decode MM.
// Given the 16x16 target macroblock and, per direction, the 18x18 reference area
// around the integer-pel vector found by the coarse search of the motion
// estimation MM (integer position at (1,1) of the area), one command:
//   1. computes the target mean and the macroblock activity sum |p - mean|,
//   2. refines each enabled direction to half-pel precision: the 9 positions
//      (dx, dy) in {-1,0,+1} half pels are matched (centre first, so ties keep the
//      integer vector) with MPEG-2 half-pel interpolation,
//   3. matches the bidirectional average of the two best predictions,
//   4. selects the mode with the lowest cost among the enabled forward, backward,
//      bidirectional (SAD) and intra (activity) candidates, and
//   5. writes the prediction of the selected mode to the prediction RAM
//      (all zero for intra).
// Every step processes one 16-pixel row per cycle: a command takes
// 1 + 32 + 144 per enabled direction + 16 (bidirectional) + 1 + 16 cycles.
// Half-pel search, mode selection, the prediction RAM and activity
// follow the architecture. Field and dual-prime modes and the no-MC choice are not
// built; comparing intra activity directly with SAD is this design's choice.
// Loading: tgt_we writes one target pixel (raster), ref_we one pixel of the forward
// (ref_dir 0) or backward (1) area (row*18+col). pred_addr reads the prediction RAM.
module me_fine_hwe (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tgt_we,
  input  logic [7:0]  tgt_addr,
  input  logic [7:0]  tgt_data,
  input  logic        ref_we,
  input  logic        ref_dir,
  input  logic [8:0]  ref_addr,
  input  logic [7:0]  ref_data,
  input  logic        start,
  input  logic [3:0]  enable,          // {intra, bi, bwd, fwd}
  output logic        busy,
  output logic        done,
  output logic [1:0]  best_mode,       // 0 fwd, 1 bwd, 2 bi, 3 intra
  output logic signed [1:0] hv_f [2],  // half-pel refinement {x, y}, forward
  output logic signed [1:0] hv_b [2],
  output logic [15:0] sad_f, sad_b, sad_bi,
  output logic [15:0] activity,
  input  logic [7:0]  pred_addr,
  output logic [7:0]  pred_data
);
  typedef enum logic [2:0] {F_IDLE, F_MEAN, F_ACT, F_FWD, F_BWD, F_BI, F_DEC, F_PRED} ph_e;
  ph_e ph;
  logic [7:0] tgt [256];
  logic [7:0] area [2][324];
  logic [7:0] pred [256];
  logic [3:0] en_q, row, cand;
  logic [15:0] acc, sum;
  logic [7:0]  mean;

  // candidate order: centre first, then raster
  function automatic logic signed [1:0] cdx(input logic [3:0] c);
    int m; m = (c == 0) ? 4 : (c <= 4 ? int'(c) - 1 : int'(c));
    return 2'(m % 3 - 1);
  endfunction
  function automatic logic signed [1:0] cdy(input logic [3:0] c);
    int m; m = (c == 0) ? 4 : (c <= 4 ? int'(c) - 1 : int'(c));
    return 2'(m / 3 - 1);
  endfunction

  // half-pel prediction of pixel (r, c) in direction d for offset (dx, dy)
  function automatic logic [7:0] hp(input logic d, input int r, input int c,
                                    input logic signed [1:0] dx, input logic signed [1:0] dy);
    int x0, y0, s;
    logic hx, hy;
    x0 = (dx < 0) ? 0 : 1;  hx = (dx != 0);
    y0 = (dy < 0) ? 0 : 1;  hy = (dy != 0);
    x0 = x0 + c; y0 = y0 + r;
    if (!hx && !hy) s = int'(area[d][y0*18 + x0]);
    else if (hx && !hy) s = (int'(area[d][y0*18 + x0]) + int'(area[d][y0*18 + x0 + 1]) + 1) >> 1;
    else if (!hx && hy) s = (int'(area[d][y0*18 + x0]) + int'(area[d][(y0+1)*18 + x0]) + 1) >> 1;
    else s = (int'(area[d][y0*18 + x0]) + int'(area[d][y0*18 + x0 + 1]) +
              int'(area[d][(y0+1)*18 + x0]) + int'(area[d][(y0+1)*18 + x0 + 1]) + 2) >> 2;
    return 8'(s);
  endfunction

  // per-row datapath
  logic [7:0]  prow [16];
  logic [15:0] rowsum;
  always_comb begin
    for (int c = 0; c < 16; c++) begin
      logic [7:0] pf, pb;
      pf = hp(1'b0, int'(row), c, (ph == F_FWD) ? cdx(cand) : hv_f[0], (ph == F_FWD) ? cdy(cand) : hv_f[1]);
      pb = hp(1'b1, int'(row), c, (ph == F_BWD) ? cdx(cand) : hv_b[0], (ph == F_BWD) ? cdy(cand) : hv_b[1]);
      unique case (ph)
        F_FWD: prow[c] = pf;
        F_BWD: prow[c] = pb;
        F_BI:  prow[c] = 8'((9'(pf) + 9'(pb) + 9'd1) >> 1);
        F_PRED: unique case (best_mode)
                  2'd0: prow[c] = pf;
                  2'd1: prow[c] = pb;
                  2'd2: prow[c] = 8'((9'(pf) + 9'(pb) + 9'd1) >> 1);
                  default: prow[c] = 8'd0;
                endcase
        default: prow[c] = 8'd0;
      endcase
    end
    rowsum = '0;
    for (int c = 0; c < 16; c++) begin
      int t, d;
      t = int'(tgt[int'(row)*16 + c]);
      unique case (ph)
        F_MEAN: d = t;
        F_ACT:  d = (t > int'(mean)) ? t - int'(mean) : int'(mean) - t;
        default: d = (t > int'(prow[c])) ? t - int'(prow[c]) : int'(prow[c]) - t;
      endcase
      rowsum = rowsum + 16'(d);
    end
  end

  always_ff @(posedge clk) begin
    if (tgt_we) tgt[tgt_addr] <= tgt_data;
    if (ref_we) area[ref_dir][ref_addr] <= ref_data;
    if (ph == F_PRED) for (int c = 0; c < 16; c++) pred[int'(row)*16 + c] <= prow[c];
  end
  assign pred_data = pred[pred_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= F_IDLE; busy <= 1'b0; done <= 1'b0; en_q <= '0; row <= '0; cand <= '0;
      acc <= '0; sum <= '0; mean <= '0; best_mode <= '0;
      hv_f[0] <= '0; hv_f[1] <= '0; hv_b[0] <= '0; hv_b[1] <= '0;
      sad_f <= '1; sad_b <= '1; sad_bi <= '1; activity <= '0;
    end else begin
      done <= 1'b0;
      if (ph != F_IDLE) row <= row + 4'd1;
      unique case (ph)
        F_IDLE: if (start) begin
          ph <= F_MEAN; busy <= 1'b1; en_q <= enable; row <= '0; sum <= '0;
          sad_f <= '1; sad_b <= '1; sad_bi <= '1;
          hv_f[0] <= '0; hv_f[1] <= '0; hv_b[0] <= '0; hv_b[1] <= '0;
        end
        F_MEAN: begin
          sum <= sum + rowsum;
          if (row == 4'd15) begin mean <= 8'((sum + rowsum + 16'd128) >> 8); ph <= F_ACT; acc <= '0; end
        end
        F_ACT: begin
          acc <= acc + rowsum;
          if (row == 4'd15) begin
            activity <= acc + rowsum; acc <= '0; cand <= '0;
            ph <= en_q[0] ? F_FWD : en_q[1] ? F_BWD : F_DEC;
          end
        end
        F_FWD, F_BWD: begin
          acc <= acc + rowsum;
          if (row == 4'd15) begin
            logic [15:0] t;
            t = acc + rowsum;
            acc <= '0;
            if (ph == F_FWD && t < sad_f) begin sad_f <= t; hv_f[0] <= cdx(cand); hv_f[1] <= cdy(cand); end
            if (ph == F_BWD && t < sad_b) begin sad_b <= t; hv_b[0] <= cdx(cand); hv_b[1] <= cdy(cand); end
            if (cand == 4'd8) begin
              cand <= '0;
              if (ph == F_FWD && en_q[1]) ph <= F_BWD;
              else if (en_q[2] && en_q[1:0] == 2'b11) ph <= F_BI;
              else ph <= F_DEC;
            end else cand <= cand + 4'd1;
          end
        end
        F_BI: begin
          acc <= acc + rowsum;
          if (row == 4'd15) begin sad_bi <= acc + rowsum; acc <= '0; ph <= F_DEC; end
        end
        F_DEC: begin
          logic [15:0] best; logic [1:0] m;
          best = '1; m = 2'd3;
          if (en_q[0] && sad_f < best) begin best = sad_f; m = 2'd0; end
          if (en_q[1] && sad_b < best) begin best = sad_b; m = 2'd1; end
          if (en_q[2] && en_q[1:0] == 2'b11 && sad_bi < best) begin best = sad_bi; m = 2'd2; end
          if (en_q[3] && activity < best) m = 2'd3;
          best_mode <= m;
          row <= '0;
          ph <= F_PRED;
        end
        F_PRED: if (row == 4'd15) begin ph <= F_IDLE; busy <= 1'b0; done <= 1'b1; end
        default: ph <= F_IDLE;
      endcase
    end
  end
endmodule
