// vlc_packer: variable length coder output stage of the video encode/decode MM,
// used as a DSP extension. Each `put` appends the n low bits of `code` (n = 1..32)
// to the bitstream, most significant bit first. Bits collect in a 64-bit buffer;
// whenever 32 or more are held, the oldest 32 are written as one word to the local
// bitstream memory, so one put per cycle never stalls. `flush` pads the last
// partial word with zero bits and writes it. `start` sets the first word address.
// Only the existence of a VLC DSP extension is given; this packer and its
// interface are this design's choices. Timing: a word write happens in the cycle
// after the put that completes it.
module vlc_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] start_addr,
  input  logic        put,
  input  logic [5:0]  n,
  input  logic [31:0] code,
  input  logic        flush,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [31:0] bit_count
);
  logic [63:0] acc;
  logic [6:0]  cnt;
  logic [15:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; ptr <= '0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      bit_count <= '0;
    end else if (start) begin
      acc <= '0; cnt <= '0; ptr <= start_addr; mem_we <= 1'b0; bit_count <= '0;
    end else begin
      logic [63:0] na; logic [6:0] nc; logic [31:0] masked;
      na = acc; nc = cnt;
      mem_we <= 1'b0;
      if (put && n != 0) begin
        masked = (n >= 6'd32) ? code : (code & ((32'd1 << n) - 32'd1));
        na = na | (({masked, 32'd0} << (32 - int'(n))) >> nc);
        nc = nc + 7'(n);
        bit_count <= bit_count + 32'(n);
      end
      if (nc >= 7'd32 || (flush && nc != 0)) begin
        mem_we    <= 1'b1;
        mem_addr  <= ptr;
        mem_wdata <= na[63:32];
        ptr <= ptr + 16'd1;
        na = na << 32;
        nc = (nc >= 7'd32) ? nc - 7'd32 : 7'd0;
      end
      acc <= na;
      cnt <= nc;
    end
  end
endmodule
