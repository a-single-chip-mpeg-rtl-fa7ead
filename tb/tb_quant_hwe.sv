// tb_quant_hwe: random blocks through inverse quantization (intra and non-intra,
// all intra_dc_precision values, random quantiser scales and weight matrices)
// compared with an MPEG-2 reference model kept here, including saturation and
// mismatch control; then forward quantization against the rounding rules of this
// design. Checks one-cycle latency and streaming at one coefficient per cycle.
module tb_quant_hwe;
  logic clk = 0, rst_n = 0;
  logic w_we, w_sel, inv, intra, in_valid, in_first, out_valid;
  logic [5:0] w_addr; logic [7:0] w_data; logic [6:0] qscale; logic [1:0] dc_prec;
  logic signed [15:0] in_data, out_data;
  int wm [2][64];
  int exp_q [$];
  int checks = 0, failures = 0, mismatch_fixes = 0, sats = 0;

  quant_hwe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      int e; e = exp_q.pop_front();
      checks++;
      if (int'(out_data) != e) begin failures++; if (failures < 6) $display("got %0d exp %0d", out_data, e); end
    end
  end

  function automatic int sat(input int v, input int lo, input int hi); return v < lo ? lo : v > hi ? hi : v; endfunction

  initial begin
    w_we = 0; w_sel = 0; w_addr = 0; w_data = 0; inv = 1; intra = 0; qscale = 1; dc_prec = 0;
    in_valid = 0; in_first = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 64; i++) begin
      @(negedge clk); w_we = 1; w_sel = s; w_addr = 6'(i); w_data = 8'(8 + $urandom % 60); wm[s][i] = w_data;
    end
    @(negedge clk); w_we = 0;
    for (int b = 0; b < 300; b++) begin
      int qf [64], f [64], sum, iv;
      iv = (b < 200);
      @(negedge clk);
      inv = iv; intra = $urandom % 2; dc_prec = 2'($urandom); qscale = 7'(1 + $urandom % 112);
      for (int i = 0; i < 64; i++) begin
        int x; x = ($urandom % 3 == 0) ? int'($urandom % 4001) - 2000 : (iv ? int'($urandom % 41) - 20 : int'($urandom % 4001) - 2000);
        if (!iv) x = sat(x, -2048, 2047);
        qf[i] = x;
      end
      if (iv) begin
        sum = 0;
        for (int i = 0; i < 64; i++) begin
          int w; w = wm[intra ? 0 : 1][i];
          if (intra && i == 0) f[i] = sat(qf[i] * (8 >> dc_prec), -2048, 2047);
          else begin
            int k; k = intra ? 0 : (qf[i] > 0) - (qf[i] < 0);
            f[i] = ((2 * qf[i] + k) * w * int'(qscale)) / 32;
            if (f[i] > 2047 || f[i] < -2048) sats++;
            f[i] = sat(f[i], -2048, 2047);
          end
          sum += f[i];
        end
        if (sum % 2 == 0) begin mismatch_fixes++; f[63] = (f[63] % 2 != 0) ? f[63] - 1 : f[63] + 1; end
      end else begin
        for (int i = 0; i < 64; i++) begin
          int w, d, x, dcm; x = qf[i]; w = wm[intra ? 0 : 1][i]; d = 2 * w * int'(qscale); dcm = 8 >> dc_prec;
          if (intra && i == 0) f[i] = (x + (x < 0 ? -(dcm/2) : dcm/2)) / dcm;
          else if (intra) f[i] = sat((32 * x + (x < 0 ? -(d/2) : d/2)) / d, -2047, 2047);
          else f[i] = sat((32 * x) / d, -2047, 2047);
        end
      end
      for (int i = 0; i < 64; i++) begin
        if (i > 0) @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_data = 16'(qf[i]);
        exp_q.push_back(f[i]);
      end
      @(negedge clk); in_valid = 0; in_first = 0;
    end
    repeat (3) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    checks++; if (mismatch_fixes == 0 || sats == 0) begin failures++; $display("mismatch/saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
