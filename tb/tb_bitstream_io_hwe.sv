// tb_bitstream_io_hwe: drives random stream bytes with packet-start flags into the
// bitstream I/O engine and pops words at random; every word must hold the next
// four bytes of a packet, first byte most significant, with partial words at a
// packet start discarded. A phase without pops must fill the FIFO, raise in_irq
// when the level reaches IRQ_LEVEL and count the lost words in `overflow`. On the
// output side random words are pushed and the serial bytes under a random
// so_ready must reproduce them in order; out_irq must follow each drain.
module tb_bitstream_io_hwe;
  localparam int DEPTH = 64, LVL = 47;
  logic clk = 0, rst_n = 0;
  logic si_valid, si_sync, in_pop, in_empty, in_irq, out_push, out_full, so_valid, so_ready, out_irq;
  logic [7:0] si_data, so_data;
  logic [31:0] in_data, out_data;
  logic [$clog2(DEPTH):0] in_level;
  logic [15:0] overflow;
  logic [31:0] expw [$];
  logic [7:0] expb [$];
  int checks = 0, failures = 0, n_irq = 0, n_oirq = 0, lost = 0, nb;
  logic [23:0] pk;
  bit prev_valid = 0;

  bitstream_io_hwe #(.DEPTH(DEPTH), .IRQ_LEVEL(LVL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input-side monitor
  always @(posedge clk) if (rst_n) begin
    if (in_pop && !in_empty) begin
      logic [31:0] e; e = expw.pop_front();
      checks++; if (in_data !== e) begin failures++; if (failures < 5) $display("in word %h exp %h", in_data, e); end
    end
    if (in_irq) begin n_irq++; checks++; if (int'(in_level) < LVL - 2) begin failures++; $display("irq at level %0d", in_level); end end
    if (out_irq) begin n_oirq++; checks++; if (prev_valid) begin failures++; $display("out_irq without drain"); end end
    prev_valid = so_valid;
    if (so_valid && so_ready) begin
      logic [7:0] e; e = expb.pop_front();
      checks++; if (so_data !== e) begin failures++; if (failures < 5) $display("out byte %h exp %h", so_data, e); end
    end
  end

  task automatic send_byte(input bit sync, input logic [7:0] b, input bit full_now);
    @(negedge clk); si_valid = 1; si_sync = sync; si_data = b;
    if (sync) begin pk = {16'd0, b}; nb = 1; end
    else begin
      nb++;
      if (nb == 4) begin
        nb = 0;
        if (full_now && int'(in_level) == DEPTH) lost++; else expw.push_back({pk, b});
      end
      pk = {pk[15:0], b};
    end
  endtask

  initial begin
    si_valid = 0; si_sync = 0; si_data = 0; in_pop = 0; out_push = 0; out_data = 0; so_ready = 0; nb = 0; pk = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // phase 1: packets of random length, random pops (never full)
    for (int p = 0; p < 60; p++) begin
      int len; len = 1 + $urandom % 200;
      for (int i = 0; i < len; i++) begin
        send_byte(i == 0, 8'($urandom), 0);
        in_pop = ($urandom % 2) && !in_empty;
        if ($urandom % 4 == 0) begin @(negedge clk); si_valid = 0; in_pop = !in_empty; end
      end
    end
    @(negedge clk); si_valid = 0;
    while (!in_empty) begin @(negedge clk); in_pop = 1; end
    @(negedge clk); in_pop = 0;
    checks++; if (expw.size() != 0) begin failures++; $display("%0d words missing", expw.size()); end
    // phase 2: no pops: fill, interrupt, overflow
    send_byte(1, 8'($urandom), 0);
    for (int i = 1; i < 4 * (DEPTH + 10); i++) send_byte(0, 8'($urandom), 1);
    @(negedge clk); si_valid = 0;
    checks++; if (int'(overflow) != lost || lost != 10) begin failures++; $display("overflow %0d lost %0d", overflow, lost); end
    checks++; if (n_irq < 1) begin failures++; $display("in_irq %0d", n_irq); end
    while (!in_empty) begin @(negedge clk); in_pop = 1; end
    @(negedge clk); in_pop = 0;
    checks++; if (expw.size() != 0) failures++;
    // phase 3: output serializer
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      so_ready = $urandom % 3 != 0;
      out_push = ($urandom % 6 == 0) && !out_full;
      out_data = $urandom;
      if (out_push) for (int k = 3; k >= 0; k--) expb.push_back(out_data[8*k +: 8]);
    end
    @(negedge clk); out_push = 0; so_ready = 1;
    repeat (4 * DEPTH + 10) @(negedge clk);
    checks++; if (expb.size() != 0 || n_oirq < 5) begin failures++; $display("left %0d bytes, out_irq %0d", expb.size(), n_oirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
