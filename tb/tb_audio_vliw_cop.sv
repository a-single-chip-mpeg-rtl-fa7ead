// tb_audio_vliw_cop: random coprocessor instruction streams against an
// instruction-level model kept here (eight registers, two 64-bit accumulators),
// including multiply-accumulate chains as in an FIR filter, funnel shifts, core
// operands and loads. Every register and accumulator is compared after every
// instruction; each result must be visible the cycle after issue.
module tb_audio_vliw_cop;
  logic clk = 0, rst_n = 0;
  logic valid, acc, use_core;
  logic [4:0] op; logic [2:0] rd, rs, rt; logic [5:0] sa;
  logic [31:0] gpr_in, ld_data, gpr_out;
  logic [63:0] acc_out [2];
  logic [31:0] mr [8]; longint ma [2];
  int checks = 0, failures = 0, macs = 0;

  audio_vliw_cop dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint sx(input logic [31:0] v); return longint'($signed(v)); endfunction

  initial begin
    valid = 0; op = 0; rd = 0; rs = 0; rt = 0; acc = 0; sa = 0; use_core = 0; gpr_in = 0; ld_data = 0;
    for (int i = 0; i < 8; i++) mr[i] = 0; ma[0] = 0; ma[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] a, b; longint p, x;
      @(negedge clk);
      valid = 1;
      op = 5'((t % 50 < 20) ? 9 + $urandom % 4 : $urandom % 22);   // MAC-heavy stretches
      rd = 3'($urandom); rs = 3'($urandom); rt = 3'($urandom); acc = $urandom % 2;
      sa = 6'($urandom % 40); use_core = ($urandom % 4 == 0);
      gpr_in = $urandom; ld_data = $urandom;
      if (op == 5'd14 && ($urandom % 4) != 0) op = 5'd11;
      a = use_core ? gpr_in : mr[rs]; b = mr[rt];
      p = sx(a) * sx(b);
      case (op)
        0: mr[rd] = a + b;
        1: mr[rd] = a - b;
        2: mr[rd] = a & b;
        3: mr[rd] = a | b;
        4: mr[rd] = a ^ b;
        5: mr[rd] = a << sa[4:0];
        6: mr[rd] = a >> sa[4:0];
        7: mr[rd] = 32'(sx(a) >>> sa[4:0]);
        8: mr[rd] = 32'({a, b} >> sa[4:0]);
        9: mr[rd] = 32'(p);
        10: ma[acc] = p;
        11: begin ma[acc] = ma[acc] + p; macs++; end
        12: ma[acc] = ma[acc] - p;
        13: begin x = ma[acc] >>> sa; mr[rd] = (x > 64'sh7FFFFFFF) ? 32'h7FFFFFFF : (x < -64'sh80000000) ? 32'h80000000 : 32'(x); end
        14: ma[acc] = 0;
        15: begin int z; z = 32; for (int i = 31; i >= 0; i--) if (a[i]) begin z = 31 - i; break; end mr[rd] = 32'(z); end
        16: mr[rd] = 32'((sx(a) > sx(b)) ? sx(a) - sx(b) : sx(b) - sx(a));
        17: mr[rd] = (sx(a) < sx(b)) ? a : b;
        18: mr[rd] = (sx(a) > sx(b)) ? a : b;
        19: begin longint hi, lo; hi = (64'sd1 <<< sa[4:0]) - 1; lo = -(64'sd1 <<< sa[4:0]);
                  mr[rd] = (sx(a) > hi) ? 32'(hi) : (sx(a) < lo) ? 32'(lo) : a; end
        20: mr[rd] = gpr_in;
        21: mr[rd] = ld_data;
        default: ;
      endcase
      @(posedge clk); #1;
      for (int i = 0; i < 8; i++) begin checks++; if (dut.r[i] != mr[i]) begin failures++; if (failures < 5) $display("t=%0d op=%0d r%0d %h exp %h", t, op, i, dut.r[i], mr[i]); end end
      for (int i = 0; i < 2; i++) begin checks++; if (acc_out[i] != 64'(ma[i])) begin failures++; if (failures < 5) $display("t=%0d op=%0d acc%0d", t, op, i); end end
    end
    checks++; if (macs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
