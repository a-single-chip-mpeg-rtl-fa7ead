// tb_me_fine_hwe: builds forward and backward 18x18 reference areas and a target
// macroblock equal to a chosen half-pel prediction from each direction (plus
// small noise), runs the engine with different mode enables, and compares with a
// model computed here: target activity, best half-pel offset and SAD per
// direction, bidirectional SAD, selected mode (lowest cost, intra by activity),
// the prediction RAM contents, and the command's cycle count.
module tb_me_fine_hwe;
  logic clk = 0, rst_n = 0;
  logic tgt_we, ref_we, ref_dir, start, busy, done;
  logic [7:0] tgt_addr, tgt_data, ref_data, pred_addr, pred_data;
  logic [8:0] ref_addr;
  logic [3:0] enable;
  logic [1:0] best_mode;
  logic signed [1:0] hv_f [2], hv_b [2];
  logic [15:0] sad_f, sad_b, sad_bi, activity;
  int area [2][324], tgt [256];
  int checks = 0, failures = 0;
  int modes_seen [4];

  me_fine_hwe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int hp(input int d, input int r, input int c, input int dx, input int dy);
    int x0, y0, a, b, cc, dd;
    x0 = c + ((dx < 0) ? 0 : 1); y0 = r + ((dy < 0) ? 0 : 1);
    a = area[d][y0*18 + x0]; b = area[d][y0*18 + x0 + 1]; cc = area[d][(y0+1)*18 + x0]; dd = area[d][(y0+1)*18 + x0 + 1];
    if (dx == 0 && dy == 0) return a;
    if (dy == 0) return (a + b + 1) / 2;
    if (dx == 0) return (a + cc + 1) / 2;
    return (a + b + cc + dd + 2) / 4;
  endfunction
  function automatic int pr(input int m, input int r, input int c, input int fx, input int fy, input int bx, input int by);
    if (m == 0) return hp(0, r, c, fx, fy);
    if (m == 1) return hp(1, r, c, bx, by);
    if (m == 2) return (hp(0, r, c, fx, fy) + hp(1, r, c, bx, by) + 1) / 2;
    return 0;
  endfunction
  function automatic int sadm(input int m, input int fx, input int fy, input int bx, input int by);
    int s; s = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
      int d; d = tgt[r*16+c] - pr(m, r, c, fx, fy, bx, by); s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  task automatic trial(input int en, input int tfx, input int tfy, input int tbx, input int tby, input int tmix);
    int bf, bb, fx, fy, bx, by, s, sbi, mean, act, m, best, c, ncyc;
    int order [9][2] = '{'{0,0}, '{-1,-1}, '{0,-1}, '{1,-1}, '{-1,0}, '{1,0}, '{-1,1}, '{0,1}, '{1,1}};
    for (int d = 0; d < 2; d++) for (int i = 0; i < 324; i++) area[d][i] = 30 + $urandom % 200;
    for (int r = 0; r < 16; r++) for (int cc = 0; cc < 16; cc++) begin
      int v;
      case (tmix)
        0: v = hp(0, r, cc, tfx, tfy);
        1: v = hp(1, r, cc, tbx, tby);
        2: v = (hp(0, r, cc, tfx, tfy) + hp(1, r, cc, tbx, tby) + 1) / 2;
        default: v = 128 + ((r + cc) % 2);   // flat block: intra wins
      endcase
      tgt[r*16+cc] = v + ((r * 16 + cc) % 17 == 0 ? 1 : 0);
    end
    for (int i = 0; i < 256; i++) begin @(negedge clk); tgt_we = 1; tgt_addr = 8'(i); tgt_data = 8'(tgt[i]); end
    @(negedge clk); tgt_we = 0;
    for (int d = 0; d < 2; d++) for (int i = 0; i < 324; i++) begin
      @(negedge clk); ref_we = 1; ref_dir = d; ref_addr = 9'(i); ref_data = 8'(area[d][i]);
    end
    @(negedge clk); ref_we = 0;
    // model
    s = 0; for (int i = 0; i < 256; i++) s += tgt[i];
    mean = (s + 128) / 256;
    act = 0; for (int i = 0; i < 256; i++) act += (tgt[i] > mean) ? tgt[i] - mean : mean - tgt[i];
    bf = 65535; bb = 65535; fx = 0; fy = 0; bx = 0; by = 0;
    for (int k = 0; k < 9; k++) begin
      if (en[0]) begin s = sadm(0, order[k][0], order[k][1], 0, 0); if (s < bf) begin bf = s; fx = order[k][0]; fy = order[k][1]; end end
      if (en[1]) begin s = sadm(1, 0, 0, order[k][0], order[k][1]); if (s < bb) begin bb = s; bx = order[k][0]; by = order[k][1]; end end
    end
    sbi = (en[2] && en[1:0] == 3) ? sadm(2, fx, fy, bx, by) : 65535;
    best = 65535; m = 3;
    if (en[0] && bf < best) begin best = bf; m = 0; end
    if (en[1] && bb < best) begin best = bb; m = 1; end
    if (en[2] && en[1:0] == 3 && sbi < best) begin best = sbi; m = 2; end
    if (en[3] && act < best) m = 3;
    ncyc = 1 + 32 + 144 * (en[0] + en[1]) + ((en[2] && en[1:0] == 3) ? 16 : 0) + 1 + 16;
    @(negedge clk); start = 1; enable = 4'(en);
    @(negedge clk); start = 0; c = 1;
    while (!done) begin @(negedge clk); c++; end
    checks++; if (c != ncyc) begin failures++; $display("cycles %0d exp %0d", c, ncyc); end
    checks++; if (int'(activity) != act) begin failures++; $display("activity %0d exp %0d", activity, act); end
    if (en[0]) begin checks++; if (int'(sad_f) != bf || hv_f[0] != 2'(fx) || hv_f[1] != 2'(fy)) begin failures++; $display("fwd %0d (%0d,%0d) exp %0d (%0d,%0d)", sad_f, hv_f[0], hv_f[1], bf, fx, fy); end end
    if (en[1]) begin checks++; if (int'(sad_b) != bb || hv_b[0] != 2'(bx) || hv_b[1] != 2'(by)) begin failures++; $display("bwd %0d exp %0d", sad_b, bb); end end
    if (en[2] && en[1:0] == 3) begin checks++; if (int'(sad_bi) != sbi) begin failures++; $display("bi %0d exp %0d", sad_bi, sbi); end end
    checks++; if (int'(best_mode) != m) begin failures++; $display("mode %0d exp %0d", best_mode, m); end
    modes_seen[m]++;
    for (int i = 0; i < 256; i++) begin
      pred_addr = 8'(i); #1;
      checks++; if (int'(pred_data) != pr(m, i / 16, i % 16, fx, fy, bx, by)) begin failures++; if (failures < 8) $display("pred %0d", i); end
    end
  endtask

  initial begin
    tgt_we = 0; ref_we = 0; ref_dir = 0; start = 0; enable = 0; tgt_addr = 0; tgt_data = 0; ref_addr = 0; ref_data = 0; pred_addr = 0;
    for (int i = 0; i < 4; i++) modes_seen[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    trial(4'b1111, 1, -1, 0, 1, 0);
    trial(4'b1111, -1, 0, 1, 1, 1);
    trial(4'b1111, 0, 1, -1, -1, 2);
    trial(4'b1111, 0, 0, 0, 0, 3);
    trial(4'b0001, 1, 1, 0, 0, 0);
    trial(4'b1010, 0, 0, -1, 1, 1);
    for (int i = 0; i < 4; i++) begin checks++; if (modes_seen[i] == 0) begin failures++; $display("mode %0d never chosen", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
