// tb_hw_semaphore: checks test-and-set by read, owner-only release and
// independence of the registers, against a reference model of lock and owner.
module tb_hw_semaphore;
  logic clk = 0, rst_n = 0;
  logic acc, we, wbit;
  logic [3:0] idx;
  logic [2:0] master;
  logic [31:0] rdata;
  logic [15:0] locked;
  int checks = 0, failures = 0;
  bit mlock [16]; int mown [16];

  hw_semaphore #(.N_SEM(16), .N_MST(6)) dut (.clk, .rst_n, .acc, .we, .idx, .master, .wbit, .rdata, .locked);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int contended = 0;
    acc = 0; we = 0; wbit = 0; idx = 0; master = 0;
    for (int i = 0; i < 16; i++) begin mlock[i] = 0; mown[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      acc = 1; we = $urandom % 2; idx = 4'($urandom % 4); master = 3'($urandom % 6); wbit = 0;
      #1;
      if (!we) begin
        bit exp;
        exp = !mlock[idx] || mown[idx] == int'(master);
        checks++;
        if (rdata[0] != exp) begin failures++; $display("read mismatch t=%0d", t); end
        if (mlock[idx] && mown[idx] != int'(master)) contended++;
        if (!mlock[idx]) begin mlock[idx] = 1; mown[idx] = master; end
      end else if (mlock[idx] && mown[idx] == int'(master)) mlock[idx] = 0;
      @(posedge clk); #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (locked[i] != mlock[i]) begin failures++; $display("lock state mismatch %0d", i); end
      end
    end
    checks++;
    if (contended == 0) begin failures++; $display("no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
