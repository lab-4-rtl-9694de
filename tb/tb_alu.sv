// tb_alu -- self-checking test of the ALU: every operation on directed
// corner operands and random operands, result and the three flags
// {neg, ovf, zro} checked against values computed here with 32-bit
// integer arithmetic.
`timescale 1ns/1ps
module tb_alu;
  import micro_control_pkg::*;

  alu_op_e     op;
  logic [15:0] a, b, r;
  logic [4:0]  sh;
  logic [2:0]  cf;
  int          checks = 0, failures = 0;

  alu dut (.ALUsel(op), .porta(a), .portb(b), .shAmt(sh), .result(r), .cf_in(cf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(alu_op_e o, logic [15:0] x, logic [15:0] y, logic [4:0] s);
    int sa, sb, full;
    logic [15:0] er;
    logic        eo;
    op = o; a = x; b = y; sh = s;
    sa = int'($signed(x)); sb = int'($signed(y));
    eo = 0;
    case (o)
      ALU_PASSA: er = x;
      ALU_PASSB: er = y;
      ALU_ADD: begin full = sa + sb; er = 16'(full); eo = (full > 32767 || full < -32768); end
      ALU_SUB: begin full = sa - sb; er = 16'(full); eo = (full > 32767 || full < -32768); end
      ALU_AND: er = x & y;
      ALU_OR:  er = x | y;
      ALU_XOR: er = x ^ y;
      ALU_NOT: er = ~x;
      ALU_SHL: er = (s >= 16) ? 16'd0 : 16'(32'(x) << s);
      ALU_SHR: er = (s >= 16) ? 16'd0 : 16'(32'(x) >> s);
      default: er = x;
    endcase
    #1;
    checks++;
    if (r !== er || cf !== {er[15], eo, er == 16'd0}) begin
      failures++;
      $display("FAIL %s a=%h b=%h sh=%0d got %h/%b exp %h/%b", o.name(), x, y, s, r, cf,
               er, {er[15], eo, er == 16'd0});
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    for (int o = 0; o < 10; o++) begin
      foreach (corner[i]) foreach (corner[j])
        run(alu_op_e'(o), corner[i], corner[j], 5'(i * 5 + j));
      for (int n = 0; n < 300; n++)
        run(alu_op_e'(o), 16'($urandom), 16'($urandom), 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
