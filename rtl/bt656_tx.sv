// bt656_tx: ITU-R BT.656 video output encoder.
// For each of LINES lines it sends EAV (FF 00 00 XY), H_BLANK blanking bytes
// (80 10 80 10 ...), SAV, and H_ACTIVE bytes of video. In active lines the video
// bytes are requested from the frame buffer side (px_req, data px_data in the same
// cycle); in vertical blanking lines blanking levels are sent. One byte leaves per
// `en` strobe. F and V per line follow the 525-line system by default (F = 1 from
// line F2_START through the first lines of the next frame, V = 1 on lines up to
// V1_END and on V2_START..V2_END); the values are parameters so a test can use
// short frames. Lines are counted from 1.
module bt656_tx #(
  parameter int unsigned H_ACTIVE = 1440,
  parameter int unsigned H_BLANK  = 268,
  parameter int unsigned LINES    = 525,
  parameter int unsigned V1_END   = 19,
  parameter int unsigned F2_START = 266,
  parameter int unsigned F1_START = 4,
  parameter int unsigned V2_START = 264,
  parameter int unsigned V2_END   = 282
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic       px_req,
  input  logic [7:0] px_data,
  output logic [7:0] dout,
  output logic       frame_start     // pulse with the first byte of line 1
);
  localparam int unsigned LEN = 4 + H_BLANK + 4 + H_ACTIVE;
  logic [$clog2(LEN)-1:0]     pos;
  logic [$clog2(LINES+1)-1:0] line;

  logic f, v;
  always_comb begin
    f = (int'(line) >= F2_START) || (int'(line) < F1_START);
    v = (int'(line) <= V1_END) || (int'(line) >= V2_START && int'(line) <= V2_END);
  end

  function automatic logic [7:0] xy(input logic ff, input logic vv, input logic hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh};
  endfunction

  always_comb begin
    int p;
    p = int'(pos);
    px_req = 1'b0;
    if (p < 4)                       dout = (p == 0) ? 8'hFF : (p == 3) ? xy(f, v, 1'b1) : 8'h00;
    else if (p < 4 + H_BLANK)        dout = ((p - 4) % 2 == 0) ? 8'h80 : 8'h10;
    else if (p < 8 + H_BLANK)        dout = (p == 4 + H_BLANK) ? 8'hFF : (p == 7 + H_BLANK) ? xy(f, v, 1'b0) : 8'h00;
    else if (v)                      dout = ((p - 8 - H_BLANK) % 2 == 0) ? 8'h80 : 8'h10;
    else begin
      px_req = en;
      dout = px_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; line <= ($clog2(LINES+1))'(1); frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (en) begin
        if (int'(pos) == LEN - 1) begin
          pos <= '0;
          if (int'(line) == LINES) begin line <= ($clog2(LINES+1))'(1); frame_start <= 1'b1; end
          else line <= line + 1'b1;
        end else pos <= pos + 1'b1;
      end
    end
  end
endmodule
