// tb_audio_io_hwe: I2S loopback. Each of the three output ports in turn is wired
// back to the input port (bit clock and word select too). After every output frame
// request the test writes fresh random stereo samples to all three ports; the
// receiver must return the looped port's samples in order, one pair per frame.
// Also checks the frame period: 2 x W bit clocks of 2 x DIV system cycles.
module tb_audio_io_hwe;
  localparam int W = 16, DIV = 4;
  logic clk = 0, rst_n = 0;
  logic rx_sck, rx_ws, rx_sd, rx_irq, tx_wr, tx_sck, tx_ws, tx_irq;
  logic [W-1:0] rx_left, rx_right, tx_left, tx_right;
  logic [1:0] tx_port;
  logic [2:0] tx_sd;
  int loop_port, checks = 0, failures = 0, got, last_req;
  logic [2*W-1:0] exq [$];
  bit synced;

  audio_io_hwe #(.W(W), .DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  assign rx_sck = tx_sck;
  assign rx_ws  = tx_ws;
  assign rx_sd  = tx_sd[loop_port];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (rx_irq) begin
      if ((!synced && rx_left == 0 && rx_right == 0) || exq.size() == 0) ;  // before the first write, or repeats after the last
      else begin
        logic [2*W-1:0] e; synced = 1; e = exq.pop_front(); got++;
        checks++; if ({rx_left, rx_right} !== e) begin failures++; if (failures < 5) $display("port %0d got %h exp %h", loop_port, {rx_left, rx_right}, e); end
      end
    end
    if (tx_irq) begin
      if (last_req >= 0) begin checks++; if (cyc - last_req != 2 * W * 2 * DIV) begin failures++; $display("frame %0d cycles", cyc - last_req); end end
      last_req = cyc;
    end
  end

  initial begin
    tx_wr = 0; tx_port = 0; tx_left = 0; tx_right = 0;
    for (int p = 0; p < 3; p++) begin
      loop_port = p; synced = 0; got = 0; last_req = -1; exq.delete();
      rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
      for (int f = 0; f < 40; f++) begin
        @(posedge clk iff tx_irq);
        for (int q = 0; q < 3; q++) begin
          @(negedge clk); tx_wr = 1; tx_port = 2'(q); tx_left = W'($urandom); tx_right = W'($urandom);
          if (q == p) exq.push_back({tx_left, tx_right});
        end
        @(negedge clk); tx_wr = 0;
      end
      repeat (3 * 2 * W * 2 * DIV) @(negedge clk);
      checks++; if (got < 38) begin failures++; $display("port %0d: only %0d pairs", p, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
