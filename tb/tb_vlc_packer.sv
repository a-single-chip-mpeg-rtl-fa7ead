// tb_vlc_packer: random codes of 1..32 bits are put, one per cycle with gaps,
// then flushed. The words written to the memory model must equal the same codes
// concatenated here bit by bit, with the final word zero-padded, and the bit count
// must match.
module tb_vlc_packer;
  logic clk = 0, rst_n = 0;
  logic start, put, flush, mem_we;
  logic [15:0] start_addr, mem_addr;
  logic [5:0] n; logic [31:0] code, mem_wdata, bit_count;
  logic [31:0] mem [1024];
  bit bits [$];
  int checks = 0, failures = 0;

  vlc_packer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (mem_we) mem[mem_addr[9:0]] <= mem_wdata;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; start_addr = 0; put = 0; flush = 0; n = 0; code = 0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'hFFFF_FFFF;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; start_addr = 16'd40; @(negedge clk); start = 0;
    for (int t = 0; t < 700; t++) begin
      @(negedge clk);
      put = ($urandom % 4) != 0;
      n = 6'(1 + $urandom % 32); code = $urandom;     // upper bits beyond n must be ignored
      if (put) for (int i = int'(n) - 1; i >= 0; i--) bits.push_back(code[i]);
    end
    @(negedge clk); put = 0; flush = 1; @(negedge clk); flush = 0;
    repeat (3) @(posedge clk);
    checks++; if (int'(bit_count) != bits.size()) begin failures++; $display("bit count %0d exp %0d", bit_count, bits.size()); end
    while (bits.size() % 32 != 0) bits.push_back(0);
    for (int w = 0; w < bits.size() / 32; w++) begin
      logic [31:0] x;
      for (int i = 0; i < 32; i++) x[31-i] = bits[w*32 + i];
      checks++; if (mem[40 + w] != x) begin failures++; if (failures < 5) $display("word %0d: %h exp %h", w, mem[40+w], x); end
    end
    checks++; if (mem[40 + bits.size()/32] != 32'hFFFF_FFFF) begin failures++; $display("wrote past the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
