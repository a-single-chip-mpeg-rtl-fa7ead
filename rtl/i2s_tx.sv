// i2s_tx: IIS (I2S) serial audio transmitter with PORTS data lines, clock master.
// It divides the system clock by 2*DIV to make the bit clock and sends, per
// frame, a W-bit left and a W-bit right sample on every data line, MSB first,
// data changing on the falling edge of the bit clock. Word select changes one bit
// before each MSB (IIS format). At the start of every frame the next samples
// (written earlier through wr_*) are taken into the shift registers and
// `frame_req` pulses so software can supply the following ones; a port not
// refilled repeats its samples. All ports share bit clock and word select.
module i2s_tx #(
  parameter int unsigned W     = 16,
  parameter int unsigned PORTS = 3,
  parameter int unsigned DIV   = 49     // 150 MHz / (2*49) / 32 bits = 47.8 kHz frames
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(PORTS)-1:0] wr_port,
  input  logic [W-1:0]             wr_left,
  input  logic [W-1:0]             wr_right,
  output logic                     sck,
  output logic                     ws,
  output logic [PORTS-1:0]         sd,
  output logic                     frame_req
);
  localparam int unsigned SW = $clog2(2*W);
  logic [W-1:0] nl [PORTS], nr [PORTS], cl [PORTS], cr [PORTS];
  logic [$clog2(DIV+1)-1:0] dcnt;
  logic [SW-1:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0; sck <= 1'b0; slot <= SW'(2*W-1); frame_req <= 1'b0;
      for (int p = 0; p < PORTS; p++) begin nl[p] <= '0; nr[p] <= '0; cl[p] <= '0; cr[p] <= '0; end
    end else begin
      frame_req <= 1'b0;
      if (wr_en) begin nl[wr_port] <= wr_left; nr[wr_port] <= wr_right; end
      if (dcnt == ($clog2(DIV+1))'(DIV-1)) begin
        dcnt <= '0;
        sck  <= !sck;
        if (sck) begin                                  // falling edge: next slot
          if (slot == SW'(2*W-1)) begin
            slot <= '0;
            for (int p = 0; p < PORTS; p++) begin cl[p] <= nl[p]; cr[p] <= nr[p]; end
            frame_req <= 1'b1;
          end else slot <= slot + 1'b1;
        end
      end else dcnt <= dcnt + 1'b1;
    end
  end

  always_comb begin
    ws = ((int'(slot) + 1) % (2*W)) >= W;
    for (int p = 0; p < PORTS; p++)
      sd[p] = (int'(slot) < W) ? cl[p][W-1-int'(slot)] : cr[p][2*W-1-int'(slot)];
  end
endmodule
