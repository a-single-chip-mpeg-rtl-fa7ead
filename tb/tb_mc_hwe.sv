// tb_mc_hwe: random pixels, half-pel flags, modes and residuals through the
// motion compensation engine, compared with MPEG-2 half-pel interpolation,
// bidirectional averaging and clipped reconstruction computed here. Checks the
// two-cycle latency at one 8-pixel row per cycle.
module tb_mc_hwe;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, hx_f, hy_f, hx_b, hy_b;
  logic [1:0] mode;
  logic [7:0] fwd [L][4], bwd [L][4], pred [L], recon [L];
  logic signed [15:0] resid [L];
  int ep [$], er [$];
  int checks = 0, failures = 0, clips = 0;

  mc_hwe #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ip(input logic [7:0] p [4], input bit hx, input bit hy);
    if (!hx && !hy) return p[0];
    if (hx && !hy) return (p[0] + p[1] + 1) / 2;
    if (!hx && hy) return (p[0] + p[2] + 1) / 2;
    return (p[0] + p[1] + p[2] + p[3] + 2) / 4;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) for (int l = 0; l < L; l++) begin
      int p, r; p = ep.pop_front(); r = er.pop_front();
      checks++; if (int'(pred[l]) != p || int'(recon[l]) != r) begin failures++; if (failures < 5) $display("lane %0d: %0d/%0d exp %0d/%0d", l, pred[l], recon[l], p, r); end
    end
  end

  initial begin
    in_valid = 0; mode = 0; hx_f = 0; hy_f = 0; hx_b = 0; hy_b = 0;
    for (int l = 0; l < L; l++) begin resid[l] = 0; for (int k = 0; k < 4; k++) begin fwd[l][k] = 0; bwd[l][k] = 0; end end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      mode = 2'($urandom); hx_f = $urandom % 2; hy_f = $urandom % 2; hx_b = $urandom % 2; hy_b = $urandom % 2;
      for (int l = 0; l < L; l++) begin
        int pf, pb, p, r;
        for (int k = 0; k < 4; k++) begin fwd[l][k] = 8'($urandom); bwd[l][k] = 8'($urandom); end
        resid[l] = 16'(int'($urandom % 601) - 300);
        pf = ip(fwd[l], hx_f, hy_f); pb = ip(bwd[l], hx_b, hy_b);
        p = (mode == 0) ? pf : (mode == 1) ? pb : (mode == 2) ? (pf + pb + 1) / 2 : 0;
        r = p + int'(resid[l]);
        if (r < 0 || r > 255) clips++;
        r = r < 0 ? 0 : r > 255 ? 255 : r;
        if (in_valid) begin ep.push_back(p); er.push_back(r); end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    checks++; if (ep.size() != 0 || clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
