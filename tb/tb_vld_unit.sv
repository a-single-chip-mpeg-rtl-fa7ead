// tb_vld_unit: a bitstream of random fixed-length fields and
// macroblock_address_increment codes (including the escape code) is built here
// from the code table written as bit strings, placed in a memory model, and
// decoded with SHOW, GET and MBAI instructions. Every result is checked, and so is
// the throughput: with refills running in the background, a stream of GET 8
// commands must be accepted every cycle.
module tb_vld_unit;
  logic clk = 0, rst_n = 0;
  logic start, cmd_valid, cmd_ready, res_valid, mem_en;
  logic [15:0] start_addr, mem_addr;
  logic [1:0] cmd_op; logic [5:0] cmd_n;
  logic [31:0] res_data, mem_rdata, bits_consumed;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;
  string mba [34] = '{"", "1", "011", "010", "0011", "0010", "00011", "00010", "0000111", "0000110",
    "00001011", "00001010", "00001001", "00001000", "00000111", "00000110",
    "0000010111", "0000010110", "0000010101", "0000010100", "0000010011", "0000010010",
    "00000100011", "00000100010", "00000100001", "00000100000", "00000011111", "00000011110",
    "00000011101", "00000011100", "00000011011", "00000011010", "00000011001", "00000011000"};
  bit bits [$];
  int kind [$], val [$], len [$];

  vld_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (mem_en) mem_rdata <= mem[mem_addr[9:0]];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put_str(input string s); for (int i = 0; i < s.len(); i++) bits.push_back(s[i] == "1"); endtask
  task automatic put_val(input int n, input logic [31:0] v); for (int i = n-1; i >= 0; i--) bits.push_back(v[i]); endtask

  task automatic cmd(input int o, input int n, output logic [31:0] r);
    @(negedge clk); cmd_valid = 1; cmd_op = 2'(o); cmd_n = 6'(n);
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    r = res_data;
    checks++; if (!res_valid) begin failures++; $display("no result valid"); end
  endtask

  initial begin
    logic [31:0] r;
    start = 0; start_addr = 0; cmd_valid = 0; cmd_op = 0; cmd_n = 0;
    // build the stream
    for (int s = 0; s < 600; s++) begin
      int k; k = $urandom % 3;
      if (k == 0) begin int n; logic [31:0] v; n = 1 + $urandom % 32; v = $urandom; if (n < 32) v &= (32'd1 << n) - 1;
        put_val(n, v); kind.push_back(0); val.push_back(int'(v)); len.push_back(n); end
      else if (k == 1) begin int m; m = 1 + $urandom % 33; put_str(mba[m]); kind.push_back(1); val.push_back(m); len.push_back(0); end
      else begin put_str("00000001000"); kind.push_back(2); val.push_back(33); len.push_back(0); end
    end
    for (int i = 0; i < 800; i++) put_val(8, 32'hA5);   // tail for the throughput test
    while (bits.size() % 32 != 0) bits.push_back(0);
    for (int w = 0; w < bits.size() / 32; w++) begin
      logic [31:0] x;
      for (int i = 0; i < 32; i++) x[31-i] = bits[w*32 + i];
      mem[100 + w] = x;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; start_addr = 100; @(negedge clk); start = 0;
    for (int s = 0; s < kind.size(); s++) begin
      if (kind[s] == 0) begin
        cmd(0, len[s], r);
        checks++; if (r != 32'(val[s])) begin failures++; if (failures < 5) $display("show %0d: %h exp %h", s, r, val[s]); end
        cmd(1, len[s], r);
        checks++; if (r != 32'(val[s])) begin failures++; if (failures < 5) $display("get %0d: %h exp %h", s, r, val[s]); end
      end else begin
        cmd(2, 0, r);
        checks++;
        if (r[5:0] != 6'(val[s]) || r[31] != (kind[s] == 2) || r[30]) begin failures++; if (failures < 5) $display("mbai %0d: %h exp %0d", s, r, val[s]); end
      end
    end
    // throughput: 400 GET 8 back to back
    begin
      int c, got; c = 0; got = 0;
      @(negedge clk); cmd_valid = 1; cmd_op = 1; cmd_n = 8;
      while (got < 400) begin
        @(posedge clk); c++;
        if (cmd_ready) got++;
        #1 if (res_valid && res_data != 32'hA5) begin failures++; $display("tail data %h", res_data); end
      end
      @(negedge clk); cmd_valid = 0;
      checks++; if (c > 402) begin failures++; $display("throughput: %0d cycles for 400", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
