// me_hwe: block-matching hardware engine of the motion estimation MM.
// It finds, for one 16x16 target macroblock, the displacement inside a search
// window of the reference picture that gives the smallest sum of absolute
// differences (with dc compensation). It holds a pair of 8x8 block-matching
// engines, a target macroblock buffer and a reference buffer. Both buffers have two
// banks: the DMA fills one bank over the local bus while the engines work on the
// other (the reference prefetch buffer is the idle reference bank). The search
// range is a rectangle [xmin,xmax] x [ymin,ymax] set per command, so the shape of
// the range can follow the motion (for example wider when the picture pans).
// Each candidate takes two cycles: in the first the two engines match the upper
// two 8x8 blocks, in the second the lower two. Ties keep the first candidate in
// raster order (y outer, x inner).
//
// Local bus (word writes, 4 pixels, lowest byte = leftmost pixel):
//   addr[12]=0 target: addr[11] bank, addr[5:0] word (row = word/4)
//   addr[12]=1 reference: addr[11] bank, addr[10:0] word (row = word/(REF_W/4))
// Control bus: write 0 = start {ref_bank[2], tgt_bank[1]}; 1 = range
// {ymax,ymin,xmax,xmin} (signed bytes); 2 = dc offset (signed 9 bits).
// Read 0 = busy, 1 = {mvy, mvx} (signed bytes), 2 = best SAD, 3 = cycles of the
// last search. The reference window is REF_W = 16 + 2*R pixels square with the
// zero-displacement macroblock at (R, R).
// Timing: busy for 2 cycles per candidate plus 3 (engine pipeline and result).
// The engine pair, buffers, double buffering, flexible range shape and dc
// compensation follow the architecture; R, the buffer layout and the register map
// are this design's choices (the +-144 x +-96 chip-level range comes from a
// hierarchical telescopic search run by firmware over this engine).
module me_hwe #(
  parameter int unsigned R = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lb_en,
  input  logic        lb_we,
  input  logic [15:0] lb_addr,
  input  logic [31:0] lb_wdata,
  input  logic        cb_we,
  input  logic [7:0]  cb_addr,
  input  logic [31:0] cb_wdata,
  output logic [31:0] cb_rdata,
  output logic        busy,
  output logic        done       // one-cycle pulse at the end of a search
);
  localparam int unsigned REF_W = 16 + 2*R;
  localparam int unsigned RWPR  = REF_W / 4;            // words per reference row
  localparam int unsigned TAGW  = 18;
  localparam logic signed [7:0] RS = 8'(R);                   // {last, phase, y[7:0], x[7:0]}

  logic [7:0] tgt  [2][256];
  logic [7:0] refm [2][REF_W*REF_W];

  logic signed [7:0] xmin, xmax, ymin, ymax, cx, cy;
  logic signed [8:0] dc_off;
  logic tb_sel, rb_sel, phase, issuing;
  logic [15:0] best_sad, part_sad;
  logic signed [7:0] best_x, best_y;
  logic [31:0] cyc, last_cyc;

  // ---------------- local bus writes
  always_ff @(posedge clk) begin
    if (lb_en && lb_we) begin
      if (!lb_addr[12]) begin
        for (int b = 0; b < 4; b++)
          tgt[lb_addr[11]][{lb_addr[5:0], 2'(b)}] <= lb_wdata[8*b +: 8];
      end else begin
        for (int b = 0; b < 4; b++)
          refm[lb_addr[11]][(int'(lb_addr[10:0]) / RWPR) * REF_W + (int'(lb_addr[10:0]) % RWPR) * 4 + b]
            <= lb_wdata[8*b +: 8];
      end
    end
  end

  // ---------------- block fetch for the two engines
  logic [7:0] cur0 [64], cur1 [64], ref0 [64], ref1 [64];
  always_comb begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        int row, col0;
        row  = int'(R) + int'(cy) + r + (phase ? 8 : 0);
        col0 = int'(R) + int'(cx) + c;
        cur0[r*8+c] = tgt[tb_sel][((phase ? 8 : 0) + r) * 16 + c];
        cur1[r*8+c] = tgt[tb_sel][((phase ? 8 : 0) + r) * 16 + 8 + c];
        ref0[r*8+c] = refm[rb_sel][row * REF_W + col0];
        ref1[r*8+c] = refm[rb_sel][row * REF_W + col0 + 8];
      end
    end
  end

  wire last_cand = (cx == xmax) && (cy == ymax);
  logic [TAGW-1:0] tag_in, tag0;
  logic v0, v1;
  logic [15:0] sad0, sad1;
  assign tag_in = {last_cand && phase, phase, cy, cx};

  block_match_engine #(.TAGW(TAGW)) u_bme0 (
    .clk, .rst_n, .in_valid(issuing), .in_tag(tag_in), .cur(cur0), .ref_px(ref0), .dc_off,
    .out_valid(v0), .out_tag(tag0), .sad(sad0));
  block_match_engine #(.TAGW(TAGW)) u_bme1 (
    .clk, .rst_n, .in_valid(issuing), .in_tag(tag_in), .cur(cur1), .ref_px(ref1), .dc_off,
    .out_valid(v1), .out_tag(), .sad(sad1));

  // ---------------- control
  function automatic logic signed [7:0] clampr(input logic signed [7:0] v);
    if (v > RS)  return RS;
    if (v < -RS) return -RS;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xmin <= '0; xmax <= '0; ymin <= '0; ymax <= '0; dc_off <= '0;
      cx <= '0; cy <= '0; phase <= 1'b0; issuing <= 1'b0; busy <= 1'b0; done <= 1'b0;
      tb_sel <= 1'b0; rb_sel <= 1'b0; best_sad <= '1; part_sad <= '0;
      best_x <= '0; best_y <= '0; cyc <= '0; last_cyc <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cyc <= cyc + 32'd1;
      if (cb_we && !busy) begin
        unique case (cb_addr)
          8'd0: begin
            tb_sel <= cb_wdata[1]; rb_sel <= cb_wdata[2];
            cx <= xmin; cy <= ymin; phase <= 1'b0;
            issuing <= 1'b1; busy <= 1'b1; best_sad <= '1; cyc <= 32'd1;
          end
          8'd1: begin
            xmin <= clampr(cb_wdata[7:0]);   xmax <= clampr(cb_wdata[15:8]);
            ymin <= clampr(cb_wdata[23:16]); ymax <= clampr(cb_wdata[31:24]);
          end
          8'd2: dc_off <= cb_wdata[8:0];
          default: ;
        endcase
      end
      // candidate issue
      if (issuing) begin
        phase <= !phase;
        if (phase) begin
          if (last_cand) issuing <= 1'b0;
          else if (cx == xmax) begin cx <= xmin; cy <= cy + 8'sd1; end
          else cx <= cx + 8'sd1;
        end
      end
      // result collection
      if (v0 && v1) begin
        if (!tag0[16]) part_sad <= sad0 + sad1;
        else begin
          logic [15:0] tot;
          tot = part_sad + sad0 + sad1;
          if (tot < best_sad) begin
            best_sad <= tot; best_x <= tag0[7:0]; best_y <= tag0[15:8];
          end
          if (tag0[17]) begin
            busy <= 1'b0; done <= 1'b1; last_cyc <= cyc;
          end
        end
      end
    end
  end

  always_comb begin
    unique case (cb_addr)
      8'd0: cb_rdata = {31'd0, busy};
      8'd1: cb_rdata = {16'd0, best_y, best_x};
      8'd2: cb_rdata = {16'd0, best_sad};
      8'd3: cb_rdata = last_cyc;
      default: cb_rdata = '0;
    endcase
  end
endmodule
