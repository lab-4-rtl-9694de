// tb_decode_unit -- self-checking test of the Micro6 decode function.
//
// Drives directed and random instruction words with both values of cTrue
// into decode_unit and compares every field of the decode bundle with a
// reference computed here by slicing the word by hand with the field
// positions of the three formats (not with the package's decode function).
`timescale 1ns/1ps
module tb_decode_unit;
  import micro_control_pkg::*;

  instr_t         instr;
  logic           cTrue;
  decode_bundle_t dut_q;
  int             checks = 0, failures = 0;

  decode_unit dut (.instReg(instr), .cTrue(cTrue), .decodeBundle(dut_q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h cTrue=%0d got=%0h exp=%0h", what, instr, cTrue, got, exp);
    end
  endtask

  task automatic check_word();
    logic [4:0]  op;
    logic [2:0]  grp;
    logic [3:0]  alu;
    logic [4:0]  asel, csel;
    logic        cfen, stken, mbrsel, porta;
    logic [1:0]  datasel;
    op      = instr[31:27];
    asel    = instr[14:10];
    csel    = instr[4:0];
    porta   = instr[18];
    cfen    = 0; stken = 0; mbrsel = 0; datasel = 2'd0; alu = 4'd0;
    grp     = 3'd0;
    if (op >= 5'd1 && op <= 5'd8) begin
      grp  = instr[16] ? 3'd2 : 3'd1;
      cfen = 1;
      case (op)
        5'd1: alu = 4'd2;  5'd2: alu = 4'd3;  5'd3: alu = 4'd4;  5'd4: alu = 4'd5;
        5'd5: alu = 4'd6;  5'd6: alu = 4'd7;  5'd7: alu = 4'd0;
        default: alu = instr[24] ? 4'd9 : 4'd8;
      endcase
    end else if (op == 5'd9) begin
      grp = 3'd3; csel = instr[10:6]; mbrsel = 1; datasel = 2'd1;
    end else if (op == 5'd10) begin
      grp = 3'd4; csel = instr[10:6]; asel = instr[10:6]; porta = 0;
    end else if (op == 5'd11) begin
      grp = !cTrue ? 3'd0 : (instr[7] ? 3'd6 : 3'd5);
      datasel = 2'd3; stken = instr[7];
    end else if (op == 5'd12) begin
      grp = 3'd7; datasel = 2'd2; stken = 1;
    end
    #1;
    check("instrGroup",  dut_q.instrGroup, grp);
    check("Asel",        dut_q.Asel, asel);
    check("Bsel",        dut_q.Bsel, instr[9:5]);
    check("Csel",        dut_q.Csel, csel);
    check("ALUsel",      dut_q.ALUsel, alu);
    check("shiftCnt",    dut_q.shiftCnt, instr[23:19]);
    check("shiftCntSrc", dut_q.shiftCntSrc, instr[25]);
    check("portAsel",    dut_q.portAsel, porta);
    check("portBsel",    dut_q.portBsel, instr[17]);
    check("CFen",        dut_q.CFen, cfen);
    check("STKen",       dut_q.STKen, stken);
    check("DATAsel",     dut_q.DATAsel, datasel);
    check("MBRsel",      dut_q.MBRsel, mbrsel);
    check("memAddr",     dut_q.memAddr, instr[26:11]);
  endtask

  initial begin
    // every opcode, both cTrue values, both StoreC/ST/D values
    for (int op = 0; op < 32; op++)
      for (int v = 0; v < 8; v++) begin
        instr = {op[4:0], 27'($urandom)};
        instr[16] = v[0]; instr[7] = v[1]; instr[24] = v[1]; cTrue = v[2];
        check_word();
      end
    // random words
    for (int n = 0; n < 2000; n++) begin
      instr = $urandom;
      instr[31:27] = 5'($urandom_range(0, 13));
      cTrue = 1'($urandom);
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
