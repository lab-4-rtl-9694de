// tb_micro6_datapath -- self-checking test of the datapath on its own.
//
// Each cycle drives a random execute bundle and decode bundle (register
// selects, ALU operation, port and shift-count selects, every enable and
// data bus source) with random ctrlData, PCout and memory data. A register
// transfer model kept here (registers, ACC, CF, MAR, MBR, wrapping stack)
// predicts the data bus, MAR, MBR, flags and accumulator, checked every
// cycle.
`timescale 1ns/1ps
module tb_micro6_datapath;
  import micro_control_pkg::*;

  logic            clk = 0, rst_n = 0;
  execute_bundle_t eb = '0;
  decode_bundle_t  db = '0;
  addr_t           ctrlData = '0, PCout = '0;
  logic [15:0]     inDPT = '0, dataBus, addrDPT, outDPT, AccOut;
  logic [2:0]      cf;
  int              checks = 0, failures = 0;

  logic [15:0] R [32], STK [16], ACC, MAR, MBR;
  logic [2:0]  CF;
  logic [3:0]  SP;

  micro6_datapath dut (.clk, .rst_n, .execBundle(eb), .decodeBundle(db), .ctrlData, .PCout,
                       .inDPT, .dataBus, .addrDPT, .outDPT, .cf, .AccOut);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [18:0] alu_model(alu_op_e op, logic [15:0] a, logic [15:0] b,
                                            logic [4:0] s);
    int f;
    logic [15:0] r;
    logic o;
    o = 0;
    case (op)
      ALU_PASSA: r = a;
      ALU_PASSB: r = b;
      ALU_ADD: begin f = int'($signed(a)) + int'($signed(b)); r = 16'(f); o = f > 32767 || f < -32768; end
      ALU_SUB: begin f = int'($signed(a)) - int'($signed(b)); r = 16'(f); o = f > 32767 || f < -32768; end
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_XOR: r = a ^ b;
      ALU_NOT: r = ~a;
      ALU_SHL: r = (s >= 16) ? 16'd0 : 16'(32'(a) << s);
      ALU_SHR: r = (s >= 16) ? 16'd0 : 16'(32'(a) >> s);
      default: r = a;
    endcase
    return {r, r[15], o, r == 16'd0};
  endfunction

  initial begin
    logic [15:0] a, b, bus;
    logic [18:0] res;
    logic [4:0]  s;
    foreach (R[i]) R[i] = '0;
    foreach (STK[i]) STK[i] = '0;
    ACC = '0; MAR = '0; MBR = '0; CF = '0; SP = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      eb = {$urandom, $urandom};
      eb.ALUsel = alu_op_e'($urandom_range(0, 9));
      // at most one stack pointer move per cycle, as the control unit does
      if (eb.stkInc && eb.stkDec) eb.stkDec = 0;
      eb.STKpop = 0;
      db = {$urandom, $urandom, $urandom};
      ctrlData = 16'($urandom); PCout = 16'($urandom); inDPT = 16'($urandom);
      a = db.portAsel ? ACC : R[eb.Asel];
      b = db.portBsel ? ACC : R[eb.Bsel];
      s = db.shiftCntSrc ? b[4:0] : db.shiftCnt;
      res = alu_model(eb.ALUsel, a, b, s);
      case (eb.DATAsel)
        DS_ACC: bus = ACC;
        DS_MBR: bus = MBR;
        DS_STK: bus = STK[SP];
        default: bus = ctrlData;
      endcase
      #1;
      checks += 5;
      if (dataBus !== bus) begin failures++; $display("FAIL bus %h exp %h", dataBus, bus); end
      if (AccOut !== ACC)  begin failures++; $display("FAIL ACC"); end
      if (cf !== CF)       begin failures++; $display("FAIL CF"); end
      if (addrDPT !== MAR) begin failures++; $display("FAIL MAR"); end
      if (outDPT !== MBR)  begin failures++; $display("FAIL MBR"); end
      @(posedge clk);
      if (eb.RegFileWr) R[eb.Csel] = bus;
      if (eb.ACCen) ACC = res[18:3];
      if (eb.CFen) CF = res[2:0];
      if (eb.MARen) MAR = bus;
      if (eb.MBRen) MBR = eb.MBRsel ? inDPT : bus;
      if (eb.STKpush) STK[SP] = PCout;
      if (eb.stkInc) SP++;
      else if (eb.stkDec) SP--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
