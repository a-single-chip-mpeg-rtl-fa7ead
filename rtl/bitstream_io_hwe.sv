// bitstream_io_hwe: bitstream I/O engine of the mux/demux MM.
// Input: transport or program stream bytes arrive with a strobe (si_valid); a byte
// flagged si_sync (a packet's first byte) restarts word packing, so every packet
// starts on a word boundary. Four bytes make one 32-bit word (first byte in the
// most significant position) that is pushed into the input FIFO; the interrupt
// handler (or DMA) pops words and stores them in the SDRAM. in_irq pulses when the
// FIFO level reaches IRQ_LEVEL; overflow counts words lost to a full FIFO.
// Output: words pushed into the output FIFO are sent as bytes, most significant
// first, one per cycle while so_ready is high; out_irq pulses when the output
// FIFO becomes empty so software can refill it. One byte per system clock gives
// 1.2 Gbit/s at 150 MHz, above the 300 Mbit/s the stream ports must carry.
// The FIFO sizes, word packing and interrupt rule are this design's choices.
module bitstream_io_hwe #(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned IRQ_LEVEL = 47     // one 188-byte transport packet
) (
  input  logic        clk,
  input  logic        rst_n,
  // stream input
  input  logic        si_valid,
  input  logic        si_sync,
  input  logic [7:0]  si_data,
  input  logic        in_pop,
  output logic [31:0] in_data,
  output logic        in_empty,
  output logic [$clog2(DEPTH):0] in_level,
  output logic        in_irq,
  output logic [15:0] overflow,
  // stream output
  input  logic        out_push,
  input  logic [31:0] out_data,
  output logic        out_full,
  output logic        so_valid,
  output logic [7:0]  so_data,
  input  logic        so_ready,
  output logic        out_irq
);
  logic [23:0] pack;
  logic [1:0]  lane;
  logic        push, ifull;
  logic [31:0] word;
  logic [$clog2(DEPTH):0] lvl_q;

  always_comb begin
    push = 1'b0;
    word = {pack, si_data};
    if (si_valid && (si_sync ? 2'd0 : lane) == 2'd3) push = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack <= '0; lane <= '0; overflow <= '0; in_irq <= 1'b0; lvl_q <= '0;
    end else begin
      if (si_valid) begin
        if (si_sync) begin pack <= {16'd0, si_data}; lane <= 2'd1; end
        else begin pack <= {pack[15:0], si_data}; lane <= lane + 2'd1; end
      end
      if (push && ifull) overflow <= overflow + 16'd1;
      lvl_q  <= in_level;
      in_irq <= (in_level >= ($clog2(DEPTH)+1)'(IRQ_LEVEL)) && (lvl_q < ($clog2(DEPTH)+1)'(IRQ_LEVEL));
    end
  end

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_in (
    .clk, .rst_n, .push, .wr_data(word), .pop(in_pop), .rd_data(in_data),
    .empty(in_empty), .full(ifull), .level(in_level));

  // output side
  logic [31:0] o_word;
  logic        o_empty, o_pop, o_empty_q;
  logic [1:0]  o_lane;

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n, .push(out_push), .wr_data(out_data), .pop(o_pop), .rd_data(o_word),
    .empty(o_empty), .full(out_full), .level());

  assign so_valid = !o_empty;
  assign so_data  = o_word[8*(3 - int'(o_lane)) +: 8];
  assign o_pop    = so_valid && so_ready && o_lane == 2'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_lane <= '0; o_empty_q <= 1'b1; out_irq <= 1'b0;
    end else begin
      if (so_valid && so_ready) o_lane <= o_lane + 2'd1;
      o_empty_q <= o_empty;
      out_irq   <= o_empty && !o_empty_q;
    end
  end
endmodule
