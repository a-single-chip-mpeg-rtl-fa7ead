// audio_io_hwe: audio I/O engine of the audio MM: one IIS input port and three
// IIS output ports (for example 5.1-channel decoded output as three stereo pairs).
// A received sample pair is held in rx_left/rx_right and raises rx_irq for the
// interrupt handler that moves it to the SDRAM; tx_irq asks the handler for the
// next output samples at every output frame. Port counts follow the chip's
// audio interface; sample width and clocking are this design's choices.
module audio_io_hwe #(
  parameter int unsigned W   = 16,
  parameter int unsigned DIV = 49      // about 48 kHz stereo frames at 150 MHz
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_sck,
  input  logic         rx_ws,
  input  logic         rx_sd,
  output logic [W-1:0] rx_left,
  output logic [W-1:0] rx_right,
  output logic         rx_irq,
  input  logic         tx_wr,
  input  logic [1:0]   tx_port,
  input  logic [W-1:0] tx_left,
  input  logic [W-1:0] tx_right,
  output logic         tx_sck,
  output logic         tx_ws,
  output logic [2:0]   tx_sd,
  output logic         tx_irq
);
  i2s_rx #(.W(W)) u_rx (
    .clk, .rst_n, .sck(rx_sck), .ws(rx_ws), .sd(rx_sd),
    .pair_valid(rx_irq), .left(rx_left), .right(rx_right));

  i2s_tx #(.W(W), .PORTS(3), .DIV(DIV)) u_tx (
    .clk, .rst_n, .wr_en(tx_wr), .wr_port(tx_port), .wr_left(tx_left), .wr_right(tx_right),
    .sck(tx_sck), .ws(tx_ws), .sd(tx_sd), .frame_req(tx_irq));
endmodule
