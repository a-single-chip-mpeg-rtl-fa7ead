// tb_mm_bridge: the core port and the DMA port of one media module issue random
// transfers at the same time through the bridge to the SDRAM model. Checks read
// data, that acks reach only the requester, and that when both wait they are
// served alternately.
module tb_mm_bridge;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t core_req, dma_req, mb_req;
  bus_rsp_t core_rsp, dma_rsp, mb_rsp;
  int checks = 0, failures = 0, done_n = 0, both_wait = 0, last_served = -1, alternations = 0;

  mm_bridge dut (.*);
  sdram_model #(.LAT(2)) mem (.clk, .req(mb_req), .rsp(mb_rsp));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (core_rsp.ack && dma_rsp.ack) begin failures++; $display("double ack"); end
    if (core_req.req && dma_req.req) both_wait++;
    if (core_rsp.ack || dma_rsp.ack) begin
      int s; s = core_rsp.ack ? 0 : 1;
      if (core_req.req && dma_req.req && last_served != s) alternations++;
      last_served = s;
    end
  end

  task automatic run(input bit is_dma);
    for (int t = 0; t < 300; t++) begin
      logic [31:0] a, d, rd;
      a = 32'($urandom % 64) + (is_dma ? 32'd1000 : 32'd2000);
      d = $urandom;
      @(negedge clk);
      if (is_dma) dma_req = '{1'b1, 1'b0, a, d}; else core_req = '{1'b1, 1'b0, a, d};
      do @(posedge clk); while (!(is_dma ? dma_rsp.ack : core_rsp.ack));
      rd = is_dma ? dma_rsp.rdata : core_rsp.rdata;
      checks++;
      if (rd != mem.peek(a)) begin failures++; $display("read mismatch"); end
      @(negedge clk);
      if (is_dma) dma_req = '0; else core_req = '0;
    end
    done_n++;
  endtask

  initial begin
    core_req = '0; dma_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork run(0); run(1); join
    checks++;
    if (alternations < 100) begin failures++; $display("not alternating: %0d", alternations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
