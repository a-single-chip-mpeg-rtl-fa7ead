// tb_block_match_engine: streams random 8x8 block pairs and dc offsets into the
// engine, one pair per cycle, and checks each SAD (computed here directly from the
// definition) and that it comes out exactly three cycles after its inputs, i.e.
// one-cycle throughput with a three-stage pipeline.
module tb_block_match_engine;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [15:0] in_tag, out_tag, sad;
  logic [7:0] cur [64], ref_px [64];
  logic signed [8:0] dc_off;
  int exp_q [$];
  int checks = 0, failures = 0, cyc = 0, sent_cyc [int];

  block_match_engine #(.TAGW(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (int'(sad) != e) begin failures++; if (failures < 5) $display("sad %0d exp %0d", sad, e); end
    checks++;
    if (cyc - sent_cyc[int'(out_tag)] != 3) begin failures++; $display("latency %0d", cyc - sent_cyc[int'(out_tag)]); end
  end

  initial begin
    in_valid = 0; in_tag = 0; dc_off = 0;
    for (int i = 0; i < 64; i++) begin cur[i] = 0; ref_px[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int s;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      in_tag = 16'(t);
      dc_off = (t % 3 == 0) ? 9'sd0 : 9'($signed(9'($urandom % 101)) - 9'sd50);
      s = 0;
      for (int i = 0; i < 64; i++) begin
        int d;
        cur[i] = 8'($urandom); ref_px[i] = (t < 100) ? cur[i] : 8'($urandom);
        d = int'(cur[i]) - int'(ref_px[i]) - int'(dc_off);
        s += (d < 0) ? -d : d;
      end
      if (in_valid) begin exp_q.push_back(s); sent_cyc[t] = cyc + 1; end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
