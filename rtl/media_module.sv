// media_module: the shell of one media module (MM) around its processor core.
// It holds what every MM shares: the data RAM, the DMA controller and the bus
// bridge to the main bus. The processor core itself is not part of this RTL: its
// load/store port to the data RAM, its main-bus port and its control bus are ports
// of this module. The control bus reaches the DMA registers (addresses 0..7) and,
// above them, the module's hardware engines (hwe_* ports). The DMA's local side
// goes to the data RAM for local addresses below DRAM_DEPTH and to the local bus
// (lb_* ports, a hardware engine's local memory) above it, so a DMA transfer, a
// control-bus access and an engine run can proceed at the same time.
// The address split and sizes are this design's choices.
module media_module
  import codec_pkg::*;
#(
  parameter int unsigned DRAM_DEPTH = 4096     // data RAM words (16 KiB), assumed
) (
  input  logic        clk,
  input  logic        rst_n,
  // core data RAM port (one-cycle read)
  input  logic        core_dr_en,
  input  logic        core_dr_we,
  input  logic [$clog2(DRAM_DEPTH)-1:0] core_dr_addr,
  input  logic [31:0] core_dr_wdata,
  output logic [31:0] core_dr_rdata,
  // core uncached access to the main bus
  input  bus_req_t    core_req,
  output bus_rsp_t    core_rsp,
  // core control bus
  input  logic        cb_we,
  input  logic [7:0]  cb_addr,
  input  logic [31:0] cb_wdata,
  output logic [31:0] cb_rdata,
  // control bus towards the hardware engines (addresses 8 and up)
  output logic        hwe_we,
  output logic [7:0]  hwe_addr,
  output logic [31:0] hwe_wdata,
  input  logic [31:0] hwe_rdata,
  // local bus towards the hardware engines' local memories
  output logic        lb_en,
  output logic        lb_we,
  output logic [15:0] lb_addr,
  output logic [31:0] lb_wdata,
  input  logic [31:0] lb_rdata,
  // main bus master port
  output bus_req_t    mb_req,
  input  bus_rsp_t    mb_rsp,
  output logic        dma_busy,
  output logic        dma_irq
);
  localparam int unsigned RAW = $clog2(DRAM_DEPTH);
  bus_req_t dma_req;
  bus_rsp_t dma_rsp;
  logic        l_en, l_we, to_ram, to_ram_q;
  logic [15:0] l_addr;
  logic [31:0] l_wdata, l_rdata, ram_b_rdata, dma_cb_rdata;

  dma_ctrl u_dma (
    .clk, .rst_n,
    .cb_we(cb_we && cb_addr < 8'd8), .cb_addr(cb_addr[2:0]), .cb_wdata, .cb_rdata(dma_cb_rdata),
    .bus_req(dma_req), .bus_rsp(dma_rsp),
    .l_en, .l_we, .l_addr, .l_wdata, .l_rdata,
    .busy(dma_busy), .irq(dma_irq)
  );

  assign to_ram = (32'(l_addr) < DRAM_DEPTH);

  dp_ram #(.DEPTH(DRAM_DEPTH), .W(32)) u_dram (
    .clk,
    .a_en(core_dr_en), .a_we(core_dr_we), .a_addr(core_dr_addr), .a_wdata(core_dr_wdata), .a_rdata(core_dr_rdata),
    .b_en(l_en && to_ram), .b_we(l_we), .b_addr(l_addr[RAW-1:0]), .b_wdata(l_wdata), .b_rdata(ram_b_rdata)
  );

  always_ff @(posedge clk) if (l_en) to_ram_q <= to_ram;
  assign l_rdata = to_ram_q ? ram_b_rdata : lb_rdata;

  assign lb_en    = l_en && !to_ram;
  assign lb_we    = l_we;
  assign lb_addr  = l_addr - 16'(DRAM_DEPTH);
  assign lb_wdata = l_wdata;

  assign hwe_we    = cb_we && cb_addr >= 8'd8;
  assign hwe_addr  = cb_addr - 8'd8;
  assign hwe_wdata = cb_wdata;
  assign cb_rdata  = (cb_addr < 8'd8) ? dma_cb_rdata : hwe_rdata;

  mm_bridge u_bridge (
    .clk, .rst_n, .core_req, .core_rsp, .dma_req, .dma_rsp, .mb_req, .mb_rsp
  );
endmodule
