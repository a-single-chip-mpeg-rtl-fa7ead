// tb_rr_arbiter: checks the round-robin arbiter against a reference model.
// Random request patterns are applied for many cycles; the expected grant is
// computed independently (search starting after the last granted index). It also
// checks fairness: with all six requesting, every requester is granted once in
// every six consecutive grants.
module tb_rr_arbiter;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [2:0] gidx;
  logic gv, adv;
  int checks = 0, failures = 0, last = N-1;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance(adv), .gnt, .gnt_idx(gidx), .gnt_valid(gv));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_i, cnt [N];
    req = '0; adv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      adv = ($urandom % 4) != 0;
      #1;
      exp_i = -1;
      for (int k = 1; k <= N; k++) if (exp_i < 0 && req[(last + k) % N]) exp_i = (last + k) % N;
      checks++;
      if ((exp_i < 0 && gv) || (exp_i >= 0 && (!gv || int'(gidx) != exp_i || gnt != N'(1 << exp_i)))) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d req=%b exp=%0d got=%0d", t, req, exp_i, gidx);
      end
      if (adv && exp_i >= 0) last = exp_i;
    end
    // fairness with all requesting
    @(negedge clk); req = '1; adv = 1;
    for (int i = 0; i < N; i++) cnt[i] = 0;
    for (int t = 0; t < 6*N; t++) begin
      @(negedge clk); cnt[gidx]++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cnt[i] != 6) begin failures++; $display("unfair: %0d granted %0d", i, cnt[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
