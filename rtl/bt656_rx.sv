// bt656_rx: ITU-R BT.656 (8-bit, 27 MHz) video input decoder.
// Bytes arrive with a strobe `en` (27 MHz in a faster system clock, or every
// cycle). The sequence FF 00 00 XY is a timing reference code; XY carries the field
// bit F, vertical blanking bit V, H (0 = start of active video, 1 = end) and four
// protection bits (V^H, F^H, F^V, F^V^H). After an SAV with V = 0 the following
// bytes (Cb Y Cr Y ...) are active video and are delivered with their index on the
// line until the next timing code. A code whose protection bits do not match is
// counted in `code_errors` and ignored. Active-video values never contain FF or 00,
// which is what makes the codes unambiguous.
module bt656_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  din,
  output logic        pix_valid,
  output logic [7:0]  pix_data,
  output logic [10:0] pix_idx,
  output logic        field,
  output logic        vblank,
  output logic        sav,          // one-cycle pulse at each start of active video
  output logic [15:0] code_errors
);
  logic [1:0] pre;          // 0 none, 1 FF, 2 FF 00, 3 FF 00 00
  logic       active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; active <= 1'b0; pix_valid <= 1'b0; pix_data <= '0; pix_idx <= '0;
      field <= 1'b0; vblank <= 1'b1; sav <= 1'b0; code_errors <= '0;
    end else begin
      pix_valid <= 1'b0;
      sav <= 1'b0;
      if (en) begin
        if (pre == 2'd3) begin
          logic f, v, h;
          f = din[6]; v = din[5]; h = din[4];
          pre <= 2'd0;
          if (din[7] && din[3:0] == {v ^ h, f ^ h, f ^ v, f ^ v ^ h}) begin
            field <= f; vblank <= v;
            active <= !h && !v;
            if (!h && !v) begin sav <= 1'b1; pix_idx <= 11'h7FF; end
          end else begin
            code_errors <= code_errors + 16'd1;
            active <= 1'b0;
          end
        end else if (din == 8'hFF) begin
          pre <= 2'd1; active <= 1'b0;
        end else if (din == 8'h00 && pre != 2'd0) begin
          pre <= pre + 2'd1;
        end else begin
          pre <= 2'd0;
          if (active) begin
            pix_valid <= 1'b1; pix_data <= din; pix_idx <= pix_idx + 11'd1;
          end
        end
      end
    end
  end
endmodule
