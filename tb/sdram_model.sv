// sdram_model: behavioural model of the shared SDRAM behind its controller, for
// testbenches only. It answers one main-bus transaction at a time after LAT
// cycles. Words never written read as init_word(addr), a fixed function of the
// address, so testbenches can predict the data. Counts reads and writes.
module sdram_model
  import codec_pkg::*;
#(
  parameter int LAT = 3
) (
  input  logic     clk,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  logic [31:0] mem [int];
  int cnt = 0;
  int n_rd = 0, n_wr = 0;

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    return mem.exists(int'(a)) ? mem[int'(a)] : init_word(a);
  endfunction

  task automatic poke(input logic [31:0] a, input logic [31:0] d);
    mem[int'(a)] = d;
  endtask

  initial rsp = '0;
  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.req && !rsp.ack) begin
      if (cnt == LAT - 1) begin
        cnt = 0;
        rsp.ack <= 1'b1;
        if (req.we) begin mem[int'(req.addr)] = req.wdata; n_wr++; end
        else begin rsp.rdata <= peek(req.addr); n_rd++; end
      end else cnt++;
    end else cnt = 0;
  end
endmodule
