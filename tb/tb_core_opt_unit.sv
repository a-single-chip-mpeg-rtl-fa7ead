// tb_core_opt_unit: random operands for every optional instruction, compared with
// results computed here (leading zeros by scanning, min/max/abs/clip by
// arithmetic on integers), plus corner values.
module tb_core_opt_unit;
  logic [2:0] op; logic [31:0] rs, rt, rd; logic [4:0] imm;
  int checks = 0, failures = 0;
  core_opt_unit dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      longint a, b, e, hi, lo;
      op = 3'(t % 6);
      rs = (t % 7 == 0) ? (32'h1 << ($urandom % 32)) : $urandom;
      if (t % 11 == 0) rs = 0;
      rt = $urandom; imm = 5'($urandom % 31);
      #1;
      a = longint'($signed(rs)); b = longint'($signed(rt));
      hi = (64'sd1 <<< imm) - 1; lo = -(64'sd1 <<< imm);
      case (op)
        0: begin e = 32; for (int i = 31; i >= 0; i--) if (rs[i]) begin e = 31 - i; break; end end
        1: e = (a > b) ? a - b : b - a;
        2: e = (a < b) ? a : b;
        3: e = (a > b) ? a : b;
        4: e = (a > hi) ? hi : (a < lo) ? lo : a;
        default: e = (a > hi) ? hi : (a < 0) ? 0 : a;
      endcase
      checks++;
      if (rd != 32'(e)) begin failures++; if (failures < 5) $display("op %0d rs %h rt %h imm %0d: %h exp %h", op, rs, rt, imm, rd, 32'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
