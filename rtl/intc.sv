// intc: interrupt controller of a media module.
// Hardware engines (DMA end, stream, audio and video I/O) raise one-cycle pulses;
// each source latches a pending bit. Every source has a programmable level (0..3)
// and an enable bit. The core sees irq high while an enabled source is pending, and
// irq_id names the pending source of the highest level (lowest index on a tie).
// Writing a source index to `ack_id` with `ack` clears its pending bit. The number of
// sources and levels is a configuration option of the processor; the priority rule
// is this design's choice.
module intc #(
  parameter int unsigned N_SRC = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_SRC-1:0]         src,
  input  logic [N_SRC-1:0]         enable,
  input  logic [1:0]               level [N_SRC],
  input  logic                     ack,
  input  logic [$clog2(N_SRC)-1:0] ack_id,
  output logic                     irq,
  output logic [$clog2(N_SRC)-1:0] irq_id,
  output logic [1:0]               irq_level
);
  logic [N_SRC-1:0] pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= '0;
    else begin
      for (int i = 0; i < N_SRC; i++)
        if (src[i]) pend_q[i] <= 1'b1;
        else if (ack && ack_id == $clog2(N_SRC)'(i)) pend_q[i] <= 1'b0;
    end
  end

  always_comb begin
    irq = 1'b0; irq_id = '0; irq_level = '0;
    for (int i = 0; i < N_SRC; i++) begin
      if (pend_q[i] && enable[i] && (!irq || level[i] > irq_level)) begin
        irq = 1'b1; irq_id = $clog2(N_SRC)'(i); irq_level = level[i];
      end
    end
  end
endmodule
