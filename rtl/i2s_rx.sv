// i2s_rx: IIS (I2S) serial audio receiver, clock slave.
// The external bit clock, word select and data lines are sampled with the system
// clock; on every rising edge of the bit clock one data bit is shifted in, most
// significant bit first. As in the IIS format, word select changes one bit before
// a word's MSB, so the bit sampled together with a change of word select is the
// LSB of the word just finished: the last W bits form that channel's sample
// (word select low = left, high = right). After each right sample the pair is
// presented for one cycle on pair_valid. Slots are W bits long (this design's
// choice). The bit clock must be slower than a quarter of the system clock.
module i2s_rx #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sck,
  input  logic         ws,
  input  logic         sd,
  output logic         pair_valid,
  output logic [W-1:0] left,
  output logic [W-1:0] right
);
  logic [2:0]   sck_s;
  logic [1:0]   ws_s, sd_s;
  logic         ws_prev;
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s <= '0; ws_s <= '0; sd_s <= '0; ws_prev <= 1'b0; sr <= '0;
      pair_valid <= 1'b0; left <= '0; right <= '0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      ws_s  <= {ws_s[0], ws};
      sd_s  <= {sd_s[0], sd};
      pair_valid <= 1'b0;
      if (sck_s[1] && !sck_s[2]) begin         // rising edge of the bit clock
        logic [W-1:0] nsr;
        nsr = {sr[W-2:0], sd_s[1]};
        sr <= nsr;
        ws_prev <= ws_s[1];
        if (ws_s[1] != ws_prev) begin
          if (!ws_prev) left <= nsr;
          else begin right <= nsr; pair_valid <= 1'b1; end
        end
      end
    end
  end
endmodule
