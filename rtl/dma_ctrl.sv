// dma_ctrl: DMA controller of a media module.
// It moves a rectangular region (WIDTH words by HEIGHT rows, each side with its own
// row stride) between the main bus (shared SDRAM) and the module's local address
// space with one command, and in descriptor chain mode it walks a linked list of
// such commands that software left in the data RAM, so one start covers many
// transfers. Both functions follow the architecture; the register map, descriptor
// layout and word-by-word transfer are this design's choices.
//
// Control registers (written through the control bus, word index):
//   0 SRC  1 DST  2 {HEIGHT[31:16], WIDTH[15:0]}  3 {DST_STRIDE[31:16], SRC_STRIDE[15:0]}
//   4 CTRL: bit0 DIR (0: main bus -> local, 1: local -> main bus)
//   6 write: start the command held in registers 0..4
//   7 write: start descriptor chain at the local (data RAM) address written
// A descriptor is 6 words in the data RAM: SRC, DST, SIZE, STRIDES, CTRL, NEXT
// (NEXT = 0 ends the chain). Reading any register returns {busy, done_count}.
// Timing: 6 local reads to fetch a descriptor, then per word one bus transaction
// and one local access (local read data one cycle after the address).
module dma_ctrl
  import codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // control bus
  input  logic        cb_we,
  input  logic [2:0]  cb_addr,
  input  logic [31:0] cb_wdata,
  output logic [31:0] cb_rdata,
  // main bus master side
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp,
  // local side (data RAM / local bus), synchronous one-cycle read
  output logic        l_en,
  output logic        l_we,
  output logic [15:0] l_addr,
  output logic [31:0] l_wdata,
  input  logic [31:0] l_rdata,
  output logic        busy,
  output logic        irq        // one-cycle pulse when a command or chain ends
);
  typedef enum logic [2:0] {D_IDLE, D_FETCH, D_FWAIT, D_RD, D_RDW, D_WR, D_NEXT} st_e;
  st_e st;
  logic [31:0] src, dst, size, stride, ctrl, nxt;
  logic [15:0] col, row;
  logic [31:0] src_row, dst_row;
  logic [2:0]  fidx;
  logic [31:0] data;
  logic [15:0] done_cnt;
  logic        chain;

  wire dir_l2m = ctrl[0];
  wire [15:0] width  = size[15:0];
  wire [15:0] height = size[31:16];
  wire [31:0] s_addr = src_row + 32'(col);
  wire [31:0] d_addr = dst_row + 32'(col);

  assign busy     = (st != D_IDLE);
  assign cb_rdata = {busy, 15'd0, done_cnt};

  always_comb begin
    bus_req = '0;
    l_en = 1'b0; l_we = 1'b0; l_addr = '0; l_wdata = data;
    unique case (st)
      D_FETCH: begin l_en = 1'b1; l_addr = nxt[15:0] + 16'(fidx); end
      D_RD: if (dir_l2m) begin l_en = 1'b1; l_addr = s_addr[15:0]; end
            else begin bus_req.req = 1'b1; bus_req.addr = s_addr; end
      D_WR: if (dir_l2m) begin bus_req.req = 1'b1; bus_req.we = 1'b1; bus_req.addr = d_addr; bus_req.wdata = data; end
            else begin l_en = 1'b1; l_we = 1'b1; l_addr = d_addr[15:0]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; src <= '0; dst <= '0; size <= '0; stride <= '0; ctrl <= '0; nxt <= '0;
      col <= '0; row <= '0; src_row <= '0; dst_row <= '0; fidx <= '0; data <= '0;
      done_cnt <= '0; chain <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      unique case (st)
        D_IDLE: if (cb_we) begin
          unique case (cb_addr)
            3'd0: src <= cb_wdata;
            3'd1: dst <= cb_wdata;
            3'd2: size <= cb_wdata;
            3'd3: stride <= cb_wdata;
            3'd4: ctrl <= cb_wdata;
            3'd6: begin
              chain <= 1'b0; nxt <= '0;
              src_row <= src; dst_row <= dst; col <= '0; row <= '0;
              st <= (size[15:0] == 0 || size[31:16] == 0) ? D_NEXT : D_RD;
            end
            3'd7: begin chain <= 1'b1; nxt <= cb_wdata; fidx <= '0; st <= D_FETCH; end
            default: ;
          endcase
        end
        D_FETCH: st <= D_FWAIT;
        D_FWAIT: begin
          unique case (fidx)
            3'd0: src <= l_rdata;
            3'd1: dst <= l_rdata;
            3'd2: size <= l_rdata;
            3'd3: stride <= l_rdata;
            3'd4: ctrl <= l_rdata;
            default: nxt <= l_rdata;
          endcase
          if (fidx == 3'd5) begin
            src_row <= src; dst_row <= dst; col <= '0; row <= '0;
            st <= (size[15:0] == 0 || size[31:16] == 0) ? D_NEXT : D_RD;
          end else begin
            fidx <= fidx + 3'd1;
            st <= D_FETCH;
          end
        end
        D_RD: if (dir_l2m) st <= D_RDW;
              else if (bus_rsp.ack) begin data <= bus_rsp.rdata; st <= D_WR; end
        D_RDW: begin data <= l_rdata; st <= D_WR; end
        D_WR: if (!dir_l2m || bus_rsp.ack) begin
          if (col + 16'd1 == width) begin
            col <= '0;
            src_row <= src_row + 32'(stride[15:0]);
            dst_row <= dst_row + 32'(stride[31:16]);
            if (row + 16'd1 == height) st <= D_NEXT;
            else begin row <= row + 16'd1; st <= D_RD; end
          end else begin
            col <= col + 16'd1;
            st <= D_RD;
          end
        end
        D_NEXT: begin
          done_cnt <= done_cnt + 16'd1;
          if (chain && nxt != 0) begin fidx <= '0; st <= D_FETCH; end
          else begin irq <= 1'b1; st <= D_IDLE; end
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
