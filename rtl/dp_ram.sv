// dp_ram: dual-port synchronous RAM, used for the instruction/data RAMs of a media
// module and the local memories of hardware engines. Each port reads or writes one
// word per cycle; read data appears the cycle after the address (registered
// read). A write and a read of the same word on the two ports in one cycle returns
// the old word. Size and width are this design's choices (not given).
module dp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [W-1:0]             b_wdata,
  output logic [W-1:0]             b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end
  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
