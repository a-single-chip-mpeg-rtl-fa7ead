// tb_media_module: one media module shell against the SDRAM model. The "core"
// writes a two-descriptor chain into the data RAM through its own port and starts
// it over the control bus: the first descriptor brings a region into the data RAM,
// the second one into a hardware engine's local memory on the local bus. While the
// DMA runs, the core makes its own main-bus reads through the bridge. Checks the
// data in the data RAM (read back through the core port), in the local memory
// model, the core's reads, the control-bus split (DMA registers below 8, engine
// registers above) and the DMA interrupt.
module tb_media_module;
  import codec_pkg::*;
  localparam int DD = 1024;
  logic clk = 0, rst_n = 0;
  logic core_dr_en, core_dr_we; logic [9:0] core_dr_addr; logic [31:0] core_dr_wdata, core_dr_rdata;
  bus_req_t core_req, mb_req; bus_rsp_t core_rsp, mb_rsp;
  logic cb_we; logic [7:0] cb_addr; logic [31:0] cb_wdata, cb_rdata;
  logic hwe_we; logic [7:0] hwe_addr; logic [31:0] hwe_wdata, hwe_rdata;
  logic lb_en, lb_we; logic [15:0] lb_addr; logic [31:0] lb_wdata, lb_rdata;
  logic dma_busy, dma_irq;
  logic [31:0] lmem [4096];
  logic [31:0] hwe_reg;
  int checks = 0, failures = 0, irqs = 0, core_reads = 0;

  media_module #(.DRAM_DEPTH(DD)) dut (.*);
  sdram_model #(.LAT(3)) mem (.clk, .req(mb_req), .rsp(mb_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (lb_en) begin if (lb_we) lmem[lb_addr[11:0]] <= lb_wdata; lb_rdata <= lmem[lb_addr[11:0]]; end
    if (hwe_we) hwe_reg <= hwe_wdata + 32'(hwe_addr);
    if (dma_irq) irqs++;
  end
  assign hwe_rdata = hwe_reg;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("%s: got %h exp %h", what, got, exp); end
  endtask
  task automatic dr_wr(input int a, input logic [31:0] d);
    @(negedge clk); core_dr_en = 1; core_dr_we = 1; core_dr_addr = 10'(a); core_dr_wdata = d;
    @(negedge clk); core_dr_en = 0; core_dr_we = 0;
  endtask
  task automatic dr_rd(input int a, output logic [31:0] d);
    @(negedge clk); core_dr_en = 1; core_dr_we = 0; core_dr_addr = 10'(a);
    @(negedge clk); core_dr_en = 0; d = core_dr_rdata;
  endtask

  initial begin
    logic [31:0] d;
    core_dr_en = 0; core_dr_we = 0; core_dr_addr = 0; core_dr_wdata = 0; core_req = '0;
    cb_we = 0; cb_addr = 0; cb_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // descriptor 0 at 16: SDRAM 300 -> data RAM 512, 3x2, strides 40/3
    dr_wr(16, 300); dr_wr(17, 512); dr_wr(18, {16'd2, 16'd3}); dr_wr(19, {16'd3, 16'd40}); dr_wr(20, 0); dr_wr(21, 32);
    // descriptor 1 at 32: SDRAM 700 -> local bus 0x10 (local address DD + 0x10), 4x3
    dr_wr(32, 700); dr_wr(33, DD + 16); dr_wr(34, {16'd3, 16'd4}); dr_wr(35, {16'd4, 16'd4}); dr_wr(36, 0); dr_wr(37, 0);
    @(negedge clk); cb_we = 1; cb_addr = 7; cb_wdata = 16;
    @(negedge clk); cb_we = 0;
    // core reads over the main bus while the DMA is busy
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); core_req = '{1'b1, 1'b0, 32'(2000 + i), 32'd0};
      do @(posedge clk); while (!core_rsp.ack);
      chk(core_rsp.rdata, mem.init_word(32'(2000 + i)), "core read");
      if (dma_busy) core_reads++;
      @(negedge clk); core_req = '0;
    end
    wait (!dma_busy); repeat (2) @(posedge clk);
    for (int r = 0; r < 2; r++) for (int c = 0; c < 3; c++) begin
      dr_rd(512 + r*3 + c, d);
      chk(d, mem.init_word(32'(300 + r*40 + c)), "data RAM");
    end
    for (int r = 0; r < 3; r++) for (int c = 0; c < 4; c++)
      chk(lmem[16 + r*4 + c], mem.init_word(32'(700 + r*4 + c)), "local bus");
    chk(32'(irqs), 1, "dma irq");
    checks++; if (core_reads == 0) begin failures++; $display("no overlap of core and DMA"); end
    // control bus split
    @(negedge clk); cb_we = 1; cb_addr = 8'd10; cb_wdata = 32'd100;
    @(negedge clk); cb_we = 0; cb_addr = 8'd10;
    #1 chk(cb_rdata, 32'd102, "engine register");
    cb_addr = 8'd0;
    #1 chk(cb_rdata, 32'd2, "dma register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
