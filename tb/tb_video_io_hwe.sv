// tb_video_io_hwe: BT.656 loopback with a reduced raster (16 active bytes, 8
// blanking bytes, 12 lines) so that several frames fit in a short run; the byte
// strobe `en` is random, as the 27 MHz video clock is slower than the system clock.
// The output side supplies a byte counter as pixel data; the input side must
// return the same bytes packed four per word (first byte least significant) with
// the right word index and field bit, one line interrupt per active line, no code
// errors, and a frame interrupt every LINES x line-length strobes. One timing
// reference code with broken protection bits must then be counted as an error.
module tb_video_io_hwe;
  localparam int HA = 16, HB = 8, LN = 12, LEN = 8 + HA + HB;
  logic clk = 0, rst_n = 0;
  logic en, in_word_valid, in_field, in_line_irq, out_px_req, out_frame_irq;
  logic [7:0] vin, vout, out_px_data;
  logic [31:0] in_word;
  logic [8:0] in_word_idx;
  logic [15:0] in_code_errors;
  logic [7:0] expb [$];
  int expf [$];
  int checks = 0, failures = 0, lines = 0, frames = 0, ens = 0, last_frame = -1, words = 0, widx = 0;
  bit corrupt = 0;

  video_io_hwe #(.H_ACTIVE(HA), .H_BLANK(HB), .LINES(LN), .V1_END(2), .F2_START(7), .F1_START(1),
                 .V2_START(6), .V2_END(8)) dut (.*);
  always #5 clk = ~clk;
  assign vin = (corrupt && vout[7:4] == 4'h8) ? vout ^ 8'h01 : vout;   // breaks an SAV's protection bits

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_px_req) begin expb.push_back(out_px_data); expf.push_back(int'(dut.u_tx.f)); out_px_data <= (out_px_data == 8'd254) ? 8'd1 : out_px_data + 8'd1; end  // 00 and FF are reserved
    if (in_line_irq) begin lines++; widx = 0; end
    if (in_word_valid) begin
      logic [31:0] e; int f;
      for (int k = 0; k < 4; k++) begin e[8*k +: 8] = expb.pop_front(); f = expf.pop_front(); end
      words++;
      checks++; if (in_word !== e || int'(in_word_idx) != widx || int'(in_field) != f) begin
        failures++; if (failures < 5) $display("word %h idx %0d f %0d exp %h %0d %0d", in_word, in_word_idx, in_field, e, widx, f); end
      widx++;
    end
    if (out_frame_irq) begin
      frames++;
      if (last_frame >= 0) begin checks++; if (ens - last_frame != LN * LEN) begin failures++; $display("frame %0d strobes", ens - last_frame); end end
      last_frame = ens;
    end
    if (en) ens++;
  end

  initial begin
    en = 0; out_px_data = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    while (frames < 4) begin @(negedge clk); en = ($urandom % 3) != 0; end
    en = 0; repeat (4) @(negedge clk);
    checks++; if (lines != 4 * 7 || in_code_errors != 0) begin failures++; $display("lines %0d errors %0d", lines, in_code_errors); end
    checks++; if (words != lines * HA / 4) begin failures++; $display("words %0d", words); end
    // a broken SAV must be counted and its line dropped
    corrupt = 1; lines = 0;
    while (lines == 0 && in_code_errors == 0) begin @(negedge clk); en = 1; end
    repeat (LEN) @(negedge clk);
    corrupt = 0; en = 0;
    checks++; if (in_code_errors == 0) begin failures++; $display("corrupt code not counted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
