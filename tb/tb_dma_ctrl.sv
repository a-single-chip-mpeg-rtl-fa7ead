// tb_dma_ctrl: checks the DMA controller's rectangular transfers and descriptor
// chain mode. A direct command copies a 5x3-word region with different source
// and destination strides from the SDRAM model to local memory; then a two-entry
// descriptor chain (written into local memory like software would) copies a
// region in and another one back out to the SDRAM. Every destination word, the
// words next to the regions (must stay untouched), the done counter and the
// interrupt pulses are checked.
module tb_dma_ctrl;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cb_we; logic [2:0] cb_addr; logic [31:0] cb_wdata, cb_rdata;
  bus_req_t bus_req; bus_rsp_t bus_rsp;
  logic l_en, l_we; logic [15:0] l_addr; logic [31:0] l_wdata, l_rdata;
  logic busy, irq;
  logic [31:0] lmem [65536];
  int checks = 0, failures = 0, irqs = 0;

  dma_ctrl dut (.clk, .rst_n, .cb_we, .cb_addr, .cb_wdata, .cb_rdata, .bus_req, .bus_rsp,
    .l_en, .l_we, .l_addr, .l_wdata, .l_rdata, .busy, .irq);
  sdram_model #(.LAT(2)) mem (.clk, .req(bus_req), .rsp(bus_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (l_en) begin
      if (l_we) lmem[l_addr] <= l_wdata;
      l_rdata <= lmem[l_addr];
    end
    if (irq) irqs++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); cb_we = 1; cb_addr = 3'(a); cb_wdata = d;
    @(negedge clk); cb_we = 0;
  endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    cb_we = 0; cb_addr = 0; cb_wdata = 0;
    for (int i = 0; i < 65536; i++) lmem[i] = 32'hDEAD_0000 | 32'(i);
    repeat (3) @(posedge clk); rst_n = 1;
    // direct: 5 wide x 3 high, src stride 100 at 1000, dst stride 8 at 0x2000
    wr(0, 1000); wr(1, 32'h2000); wr(2, {16'd3, 16'd5}); wr(3, {16'd8, 16'd100}); wr(4, 0); wr(6, 0);
    wait (!busy); @(posedge clk);
    for (int r = 0; r < 3; r++) for (int c = 0; c < 8; c++)
      chk(lmem[16'h2000 + r*8 + c], (c < 5) ? mem.init_word(32'(1000 + r*100 + c)) : (32'hDEAD_0000 | 32'(16'h2000 + r*8 + c)), "direct");
    chk(32'(irqs), 1, "irq after direct");
    // chain: desc A at 0x100: SDRAM 5000 (stride 50) -> local 0x3000 (stride 4), 4x2
    //        desc B at 0x200: local 0x3000 (stride 4) -> SDRAM 9000 (stride 10), 4x2
    lmem[16'h100] = 5000; lmem[16'h101] = 32'h3000; lmem[16'h102] = {16'd2, 16'd4};
    lmem[16'h103] = {16'd4, 16'd50}; lmem[16'h104] = 0; lmem[16'h105] = 32'h200;
    lmem[16'h200] = 32'h3000; lmem[16'h201] = 9000; lmem[16'h202] = {16'd2, 16'd4};
    lmem[16'h203] = {16'd10, 16'd4}; lmem[16'h204] = 1; lmem[16'h205] = 0;
    wr(7, 32'h100);
    wait (!busy); @(posedge clk);
    for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) begin
      chk(lmem[16'h3000 + r*4 + c], mem.init_word(32'(5000 + r*50 + c)), "chain in");
      chk(mem.peek(32'(9000 + r*10 + c)), mem.init_word(32'(5000 + r*50 + c)), "chain out");
    end
    chk(mem.peek(9004), mem.init_word(9004), "untouched");
    chk(32'(irqs), 2, "one irq per chain");
    chk(cb_rdata & 32'hFFFF, 3, "done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
