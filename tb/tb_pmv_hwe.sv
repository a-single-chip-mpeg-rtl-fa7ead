// tb_pmv_hwe: random motion_code/residual sequences for all eight predictors and
// all f_codes, compared with a reference model of MPEG-2 motion vector
// reconstruction kept here (including field vectors in frame pictures and the
// predictor reset). Checks the one-cycle result latency.
module tb_pmv_hwe;
  logic clk = 0, rst_n = 0;
  logic reset_pmv, req, r_idx, s_idx, t_idx, fld, valid;
  logic [3:0] f_code;
  logic signed [5:0] motion_code;
  logic [7:0] motion_residual;
  logic signed [15:0] vector;
  int pm [8];
  int checks = 0, failures = 0;

  pmv_hwe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reset_pmv = 0; req = 0; r_idx = 0; s_idx = 0; t_idx = 0; fld = 0; f_code = 1;
    motion_code = 0; motion_residual = 0;
    for (int i = 0; i < 8; i++) pm[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int k, f, p, delta, v;
      @(negedge clk);
      reset_pmv = (t % 97 == 0);
      if (reset_pmv) begin for (int i = 0; i < 8; i++) pm[i] = 0; req = 0; continue; end
      req = 1;
      r_idx = $urandom % 2; s_idx = $urandom % 2; t_idx = $urandom % 2; fld = $urandom % 2;
      f_code = 4'(1 + $urandom % 9); f = 1 << (f_code - 1);
      motion_code = 6'(int'($urandom % 33) - 16);
      motion_residual = 8'($urandom % f);
      k = {r_idx, s_idx, t_idx};
      p = pm[k];
      if (fld && t_idx) p = p >>> 1;
      if (f == 1 || motion_code == 0) delta = motion_code;
      else begin
        delta = ((motion_code < 0 ? -int'(motion_code) : int'(motion_code)) - 1) * f + motion_residual + 1;
        if (motion_code < 0) delta = -delta;
      end
      v = p + delta;
      if (v < -16*f) v += 32*f; else if (v > 16*f - 1) v -= 32*f;
      pm[k] = (fld && t_idx) ? v * 2 : v;
      @(posedge clk); #1;
      checks++;
      if (!valid || int'(vector) != v) begin failures++; if (failures < 5) $display("t=%0d got %0d exp %0d", t, vector, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
