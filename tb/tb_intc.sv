// tb_intc: random interrupt pulses, enables and levels against a reference model
// of the pending bits and of the priority rule (highest level, then lowest index),
// with acknowledgements clearing the served source.
module tb_intc;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] src, enable;
  logic [1:0] level [N];
  logic ack; logic [2:0] ack_id;
  logic irq; logic [2:0] irq_id; logic [1:0] irq_level;
  bit pend [N];
  int checks = 0, failures = 0, served = 0;

  intc #(.N_SRC(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    src = 0; ack = 0; ack_id = 0; enable = 8'hFF;
    for (int i = 0; i < N; i++) begin level[i] = 2'($urandom); pend[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int e; bit ei; int el;
      @(negedge clk);
      if (t % 500 == 0) begin enable = 8'($urandom); for (int i = 0; i < N; i++) level[i] = 2'($urandom); end
      #1;
      e = -1; el = -1;
      for (int i = 0; i < N; i++) if (pend[i] && enable[i] && int'(level[i]) > el) begin e = i; el = level[i]; end
      checks++;
      if ((e < 0) ? irq : (!irq || int'(irq_id) != e)) begin failures++; $display("t=%0d exp %0d got %0d/%0d", t, e, irq, irq_id); end
      src = ($urandom % 3 == 0) ? 8'(1 << ($urandom % N)) : 8'd0;
      ack = (e >= 0) && ($urandom % 2 == 0);
      ack_id = 3'(e);
      for (int i = 0; i < N; i++) if (src[i]) pend[i] = 1; else if (ack && ack_id == 3'(i)) pend[i] = 0;
      if (ack) served++;
    end
    checks++;
    if (served < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
