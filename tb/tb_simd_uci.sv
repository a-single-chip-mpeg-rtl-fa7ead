// tb_simd_uci: every SIMD custom instruction on random operands against lane-wise
// results computed here; motion-vector encoding is checked by decoding the
// produced motion_code/residual back with the MPEG-2 rule and comparing with the
// wrapped difference.
module tb_simd_uci;
  logic [3:0] op; logic [31:0] rs, rt, rd; logic [15:0] imm;
  int checks = 0, failures = 0;
  simd_uci dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] model(input int o, input logic [31:0] a, input logic [31:0] b, input logic [15:0] im);
    logic [31:0] r; r = 0;
    case (o)
      0: for (int i = 0; i < 4; i++) r[8*i +: 8] = 8'(int'(a[8*i +: 8]) + int'(b[8*i +: 8]));
      1: for (int i = 0; i < 2; i++) r[16*i +: 16] = 16'(int'(a[16*i +: 16]) + int'(b[16*i +: 16]));
      2: for (int i = 0; i < 4; i++) r[8*i +: 8] = 8'(int'(a[8*i +: 8]) - int'(b[8*i +: 8]));
      3: for (int i = 0; i < 2; i++) r[16*i +: 16] = 16'(int'(a[16*i +: 16]) - int'(b[16*i +: 16]));
      4: for (int i = 0; i < 2; i++) r[16*i +: 16] = 16'(int'(a[16*i +: 16]) * (1 << im[3:0]));
      5: for (int i = 0; i < 2; i++) r[16*i +: 16] = 16'(int'(a[16*i +: 16]) / (1 << im[3:0]));
      6: for (int i = 0; i < 2; i++) begin int v; v = int'($signed(a[16*i +: 16])); r[16*i +: 16] = 16'((v - ((v < 0) ? (1 << im[3:0]) - 1 : 0)) / (1 << im[3:0])); end
      7: for (int i = 0; i < 4; i++) r[8*i +: 8] = (int'($signed(a[8*i +: 8])) < int'($signed(b[8*i +: 8]))) ? 8'hFF : 8'h00;
      8: for (int i = 0; i < 2; i++) r[16*i +: 16] = (int'($signed(a[16*i +: 16])) < int'($signed(b[16*i +: 16]))) ? 16'hFFFF : 16'h0;
      9: r = a & b;
      10: r = a | b;
      11: r = a ^ b;
      12: r = ~(a | b);
      13: for (int i = 0; i < 4; i++) r[8*i +: 8] = a[8*im[2*i +: 2] +: 8];
      default: r = 0;
    endcase
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      op = 4'(t % 14); rs = $urandom; rt = $urandom; imm = 16'($urandom);
      #1; checks++;
      if (rd != model(op, rs, rt, imm)) begin failures++; if (failures < 5) $display("op %0d: %h exp %h", op, rd, model(op, rs, rt, imm)); end
    end
    // motion vector encoding
    for (int t = 0; t < 3000; t++) begin
      int fc, f, d, w, code, res, back;
      fc = 1 + $urandom % 9; f = 1 << (fc - 1);
      d = int'($urandom % (64 * f)) - 32 * f;
      op = 4'd14; rs = {16'd0, 16'(d)}; imm = 16'(fc); rt = 0;
      #1;
      w = d; if (w > 16*f - 1) w -= 32*f; if (w < -16*f) w += 32*f;
      code = int'($signed(rd[15:0])); res = int'(rd[31:16]);
      if (code == 0) back = 0;
      else begin
        back = ((code < 0 ? -code : code) - 1) * f + res + 1;
        if (code < 0) back = -back;
      end
      checks++;
      if (back != w || code > 16 || code < -16 || res >= f) begin
        failures++; if (failures < 5) $display("mv d=%0d f=%0d code=%0d res=%0d", d, f, code, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
