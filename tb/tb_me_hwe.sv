// tb_me_hwe: runs block-matching searches and compares with a brute-force search
// computed here. The target macroblock is cut from the reference window at a
// chosen displacement and slightly disturbed, so the minimum is unique. Checks:
// best vector and SAD for a full square range, for an asymmetric range shape,
// with a dc offset (a faded reference), and double buffering: bank 1 is loaded
// over the local bus while bank 0 is being searched. Also checks the cycle count
// of a search: two cycles per candidate plus three. Then random trials (bank,
// displacement, range rectangle, dc offset) against the same brute-force model.
module tb_me_hwe;
  localparam int R = 8, W = 16 + 2*R;
  logic clk = 0, rst_n = 0;
  logic lb_en, lb_we; logic [15:0] lb_addr; logic [31:0] lb_wdata;
  logic cb_we; logic [7:0] cb_addr; logic [31:0] cb_wdata, cb_rdata;
  logic busy, done;
  logic [7:0] refw [2][W*W];
  logic [7:0] tgt [2][256];
  int checks = 0, failures = 0;

  me_hwe #(.R(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cbw(input int a, input logic [31:0] d);
    @(negedge clk); cb_we = 1; cb_addr = 8'(a); cb_wdata = d;
    @(negedge clk); cb_we = 0;
  endtask
  task automatic lbw(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); lb_en = 1; lb_we = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk); lb_en = 0; lb_we = 0;
  endtask
  task automatic make(input int b, input int dx, input int dy, input int fade);
    for (int i = 0; i < W*W; i++) refw[b][i] = 8'(40 + $urandom % 160);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
      int v;
      v = int'(refw[b][(R + dy + r) * W + R + dx + c]) + fade + ((r == c) ? 1 : 0);
      tgt[b][r*16 + c] = 8'(v);
    end
  endtask
  task automatic load(input int b);
    for (int w = 0; w < 64; w++)
      lbw(16'(b << 11) | 16'(w), {tgt[b][w*4+3], tgt[b][w*4+2], tgt[b][w*4+1], tgt[b][w*4]});
    for (int w = 0; w < W*W/4; w++)
      lbw(16'h1000 | 16'(b << 11) | 16'(w), {refw[b][w*4+3], refw[b][w*4+2], refw[b][w*4+1], refw[b][w*4]});
  endtask
  task automatic expect_best(input int b, input int x0, input int x1, input int y0, input int y1,
                             input int dc, output int bx, output int by, output int bs);
    bs = 1 << 30; bx = 0; by = 0;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) begin
      int s; s = 0;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int d; d = int'(tgt[b][r*16+c]) - int'(refw[b][(R+y+r)*W + R+x+c]) - dc;
        s += (d < 0) ? -d : d;
      end
      if (s < bs) begin bs = s; bx = x; by = y; end
    end
  endtask
  task automatic search_check(input int b, input int x0, input int x1, input int y0, input int y1,
                              input int dc, input string what);
    int bx, by, bs, cyc;
    cbw(1, {8'(y1), 8'(y0), 8'(x1), 8'(x0)});
    cbw(2, 32'(dc));
    @(negedge clk); cb_we = 1; cb_addr = 0; cb_wdata = {29'd0, 1'(b), 1'(b), 1'b1};
    @(negedge clk); cb_we = 0;
    expect_best(b, x0, x1, y0, y1, dc, bx, by, bs);
    wait (!busy); @(negedge clk);
    cb_addr = 1; #1;
    checks++; if ($signed(cb_rdata[7:0]) != bx || $signed(cb_rdata[15:8]) != by) begin
      failures++; $display("%s: mv (%0d,%0d) exp (%0d,%0d)", what, $signed(cb_rdata[7:0]), $signed(cb_rdata[15:8]), bx, by); end
    cb_addr = 2; #1;
    checks++; if (int'(cb_rdata) != bs) begin failures++; $display("%s: sad %0d exp %0d", what, cb_rdata, bs); end
    cb_addr = 3; #1;
    cyc = 2 * (x1 - x0 + 1) * (y1 - y0 + 1) + 3;
    checks++; if (int'(cb_rdata) != cyc) begin failures++; $display("%s: cycles %0d exp %0d", what, cb_rdata, cyc); end
  endtask

  initial begin
    lb_en = 0; lb_we = 0; lb_addr = 0; lb_wdata = 0; cb_we = 0; cb_addr = 0; cb_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    make(0, 3, -5, 0);
    load(0);
    search_check(0, -8, 8, -8, 8, 0, "full range"); 
    search_check(0, -2, 6, -6, -1, 0, "asymmetric range");
    // faded target: dc offset must restore the match
    for (int i = 0; i < 256; i++) tgt[0][i] = 8'(int'(tgt[0][i]) + 20);
    for (int w = 0; w < 64; w++)
      lbw(16'(w), {tgt[0][w*4+3], tgt[0][w*4+2], tgt[0][w*4+1], tgt[0][w*4]});
    search_check(0, -8, 8, -8, 8, 20, "dc compensated");
    // double buffering: start bank 0, fill bank 1 during the search
    make(1, -7, 6, 0);
    cbw(1, {8'(8), 8'(-8), 8'(8), 8'(-8)});
    cbw(2, 32'd20);
    @(negedge clk); cb_we = 1; cb_addr = 0; cb_wdata = 32'd1;
    @(negedge clk); cb_we = 0;
    checks++; if (!busy) begin failures++; $display("search not running during load"); end
    load(1);
    wait (!busy);
    begin
      int bx, by, bs;
      expect_best(0, -8, 8, -8, 8, 20, bx, by, bs);
      @(negedge clk); cb_addr = 2; #1;
      checks++; if (int'(cb_rdata) != bs) begin failures++; $display("bank 0 result disturbed by bank 1 load"); end
    end
    search_check(1, -8, 8, -8, 8, 0, "bank 1");
    // random trials: bank, planted displacement, range rectangle and dc offset
    for (int t = 0; t < 12; t++) begin
      int b, x0, x1, y0, y1, dc;
      b = $urandom % 2;
      make(b, int'($urandom % 17) - 8, int'($urandom % 17) - 8, 0);
      load(b);
      x0 = int'($urandom % 17) - 8; x1 = x0 + int'($urandom % (9 - x0));
      y0 = int'($urandom % 17) - 8; y1 = y0 + int'($urandom % (9 - y0));
      dc = ($urandom % 3 == 0) ? int'($urandom % 21) - 10 : 0;
      search_check(b, x0, x1, y0, y1, dc, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
