// tb_dp_ram: random reads and writes on both ports against a reference array;
// checks one-cycle read latency and that each port sees the other's writes.
module tb_dp_ram;
  localparam int D = 256;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [7:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] ref_m [D];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(D), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] ea, eb; logic ra, rb;
    a_en = 1; a_we = 1; b_en = 0; b_we = 0; a_wdata = 0; b_wdata = 0; b_addr = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_addr = 8'(i); a_wdata = $urandom; ref_m[i] = a_wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_addr = 8'($urandom); b_addr = 8'($urandom);
      if (a_addr == b_addr) b_addr = b_addr + 8'd1;
      a_we = $urandom % 2; b_we = $urandom % 2;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = ref_m[a_addr]; eb = ref_m[b_addr]; ra = !a_we; rb = !b_we;
      if (a_we) ref_m[a_addr] = a_wdata;
      if (b_we) ref_m[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) begin checks++; if (a_rdata != ea) failures++; end
      if (rb) begin checks++; if (b_rdata != eb) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
