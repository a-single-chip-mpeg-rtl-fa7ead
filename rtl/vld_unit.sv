// vld_unit: variable length decoder of the video encode/decode MM, used as a DSP
// extension. A 64-bit bit buffer (next bit in bit 63) is refilled one 32-bit word
// at a time from the local memory that holds the bitstream, whenever 32 bits or
// fewer remain, so decoding never waits on a refill unless bits are consumed
// faster than one word per cycle. Instructions:
//   SHOW n : next n bits (1..32), not consumed
//   GET  n : next n bits, consumed (fixed-length code)
//   MBAI   : decode one macroblock_address_increment code (MPEG-2 Table B-1),
//            result = {escape, invalid, 24'b0, value}; the escape code returns
//            value 33 with bit 31 set so firmware adds 33 and decodes again.
// A command is taken in a cycle where cmd_ready is high; its result is valid one
// cycle later. `start` restarts the stream at word address start_addr.
// The bit buffer, local bitstream memory, refill logic and the single-symbol
// instructions follow the architecture. The macroblock-decode command that reuses
// these resources is not built here; widths and encodings are this design's.
module vld_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] start_addr,
  input  logic        cmd_valid,
  input  logic [1:0]  cmd_op,       // 0 SHOW, 1 GET, 2 MBAI
  input  logic [5:0]  cmd_n,
  output logic        cmd_ready,
  output logic        res_valid,
  output logic [31:0] res_data,
  output logic        mem_en,
  output logic [15:0] mem_addr,
  input  logic [31:0] mem_rdata,
  output logic [31:0] bits_consumed
);
  logic [63:0] bbuf;
  logic [6:0]  cnt;
  logic        pend, running;
  logic [15:0] ptr;

  // macroblock_address_increment decode: {len, value}, len 0 = invalid
  function automatic logic [9:0] mbai(input logic [10:0] b);
    logic [3:0] len; logic [5:0] v;
    len = 4'd0; v = 6'd0;
    casez (b)
      11'b1??????????: begin len = 4'd1;  v = 6'd1; end
      11'b01?????????: begin len = 4'd3;  v = 6'(5 - int'(b[10:8])); end
      11'b001????????: begin len = 4'd4;  v = 6'(7 - int'(b[10:7])); end
      11'b0001???????: begin len = 4'd5;  v = 6'(9 - int'(b[10:6])); end
      11'b000011?????: begin len = 4'd7;  v = 6'(15 - int'(b[10:4])); end
      11'b000010?????, 11'b0000011????: begin len = 4'd8; v = 6'(21 - int'(b[10:3])); end
      11'b0000010????: begin
        if (b[10:1] >= 10'b0000010010) begin len = 4'd10; v = 6'(39 - int'(b[10:1])); end
        else begin len = 4'd11; v = 6'(57 - int'(b)); end
      end
      11'b00000011???: begin len = 4'd11; v = 6'(57 - int'(b)); end
      11'b00000001000: begin len = 4'd11; v = 6'd34; end   // escape
      default: ;
    endcase
    return {len, v};
  endfunction

  logic [5:0] need;
  logic [9:0] mb;
  logic [6:0] used;
  logic [31:0] result;
  always_comb begin
    mb   = mbai(bbuf[63:53]);
    need = (cmd_op == 2'd2) ? 6'd11 : cmd_n;
    cmd_ready = running && (cnt >= 7'(need));
    used   = '0;
    result = '0;
    unique case (cmd_op)
      2'd0: result = 32'(bbuf[63:32] >> (32 - int'(cmd_n)));
      2'd1: begin result = 32'(bbuf[63:32] >> (32 - int'(cmd_n))); used = 7'(cmd_n); end
      2'd2: begin
        if (mb[9:6] == 0) begin result = {1'b0, 1'b1, 30'd0}; used = 7'd1; end
        else if (mb[5:0] == 6'd34) begin result = {1'b1, 25'd0, 6'd33}; used = 7'd11; end
        else begin result = {26'd0, mb[5:0]}; used = 7'(mb[9:6]); end
      end
      default: ;
    endcase
    if (!(cmd_valid && cmd_ready)) used = '0;
  end

  assign mem_en   = running && !pend && cnt <= 7'd32;
  assign mem_addr = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbuf <= '0; cnt <= '0; pend <= 1'b0; running <= 1'b0; ptr <= '0;
      res_valid <= 1'b0; res_data <= '0; bits_consumed <= '0;
    end else if (start) begin
      bbuf <= '0; cnt <= '0; pend <= 1'b0; running <= 1'b1; ptr <= start_addr;
      res_valid <= 1'b0; bits_consumed <= '0;
    end else begin
      logic [63:0] nb; logic [6:0] nc;
      nb = bbuf << used;
      nc = cnt - used;
      if (pend) begin
        nb = nb | ({mem_rdata, 32'd0} >> nc);
        nc = nc + 7'd32;
      end
      bbuf <= nb;
      cnt  <= nc;
      pend <= mem_en;
      if (mem_en) ptr <= ptr + 16'd1;
      res_valid <= cmd_valid && cmd_ready;
      if (cmd_valid && cmd_ready) res_data <= result;
      bits_consumed <= bits_consumed + 32'(used);
    end
  end
endmodule
