// video_io_hwe: video I/O engine of the video pre/postprocessing MM.
// Input side: a BT.656 decoder extracts active-video bytes, which are packed four to
// a word (first byte lowest) and offered on in_word_valid with the word's index on
// the line, for the interrupt handler or DMA to store in the SDRAM; in_line_irq
// pulses at each start of active video. Output side: a BT.656 encoder sends frames
// and pulls active bytes from out_px_data; out_frame_irq pulses at each frame
// start. The BT.656 interface follows the chip; the packing is this design's.
module video_io_hwe #(
  parameter int unsigned H_ACTIVE = 1440,
  parameter int unsigned H_BLANK  = 268,
  parameter int unsigned LINES    = 525,
  parameter int unsigned V1_END   = 19,
  parameter int unsigned F2_START = 266,
  parameter int unsigned F1_START = 4,
  parameter int unsigned V2_START = 264,
  parameter int unsigned V2_END   = 282
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,            // 27 MHz byte strobe
  input  logic [7:0]  vin,
  output logic        in_word_valid,
  output logic [31:0] in_word,
  output logic [8:0]  in_word_idx,
  output logic        in_field,
  output logic        in_line_irq,
  output logic [15:0] in_code_errors,
  output logic [7:0]  vout,
  output logic        out_px_req,
  input  logic [7:0]  out_px_data,
  output logic        out_frame_irq
);
  logic       pv;
  logic [7:0] pd;
  logic [10:0] pidx;
  logic [23:0] pk;

  bt656_rx u_rx (
    .clk, .rst_n, .en, .din(vin), .pix_valid(pv), .pix_data(pd), .pix_idx(pidx),
    .field(in_field), .vblank(), .sav(in_line_irq), .code_errors(in_code_errors));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk <= '0; in_word_valid <= 1'b0; in_word <= '0; in_word_idx <= '0;
    end else begin
      in_word_valid <= 1'b0;
      if (pv) begin
        pk <= {pd, pk[23:8]};
        if (pidx[1:0] == 2'd3) begin
          in_word_valid <= 1'b1;
          in_word <= {pd, pk};
          in_word_idx <= pidx[10:2];
        end
      end
    end
  end

  bt656_tx #(.H_ACTIVE(H_ACTIVE), .H_BLANK(H_BLANK), .LINES(LINES), .V1_END(V1_END),
             .F2_START(F2_START), .F1_START(F1_START), .V2_START(V2_START), .V2_END(V2_END)) u_tx (
    .clk, .rst_n, .en, .px_req(out_px_req), .px_data(out_px_data), .dout(vout),
    .frame_start(out_frame_irq));
endmodule
