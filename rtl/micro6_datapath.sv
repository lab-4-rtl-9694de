// micro6_datapath -- the Micro6 datapath driven by the control unit.
//
// Blocks and connections:
//   * regfile: read ports busA/busB at Asel/Bsel; write port busC from the
//     data bus at Csel on RegFileWr.
//   * ALU port muxes: port A is ACC when portAsel, else busA; port B is ACC
//     when portBsel, else busB.
//   * alu: ALUsel; the shift count is portB[4:0] when shiftCntSrc, else
//     shiftCnt.
//   * CF: latches the ALU flags {neg, ovf, zro} on CFen.
//   * ACC: latches the ALU result on ACCen.
//   * data bus: multiplexed by DATAsel from AccOut, MBRout, StkOut and the
//     control unit's ctrlData.
//   * MAR: loads from the data bus on MARen; drives the data address.
//   * MBR: loads on MBRen from the data bus (MBRsel=0) or from the memory
//     read data inDPT (MBRsel=1); drives the memory write data.
//   * stack: pushes PCout; its output goes onto the data bus.
// The data bus is also the PC's load input.
//
// Interface: execBundle and decodeBundle from the control unit, ctrlData,
// PCout; inDPT from memory; dataBus, addrDPT (MAR), outDPT (MBR), cf (flags
// for the condition check), AccOut. Parameters: DATA_W (16), NREGS (32),
// STACK_DEPTH (16).
// Timing: every register loads at the clock edge that ends the cycle in
// which its enable is high; the data bus and ALU are combinational.
// The blocks, their connections and control signals follow the Micro6
// architecture and bundle tables. The data width, the stack depth, the ALU
// operation set and the omission of the IO data ports are this design's
// choice.
module micro6_datapath
  import micro_control_pkg::*;
#(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned NREGS       = 32,
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  execute_bundle_t   execBundle,
  input  decode_bundle_t    decodeBundle,
  input  addr_t             ctrlData,
  input  addr_t             PCout,
  input  logic [DATA_W-1:0] inDPT,
  output logic [DATA_W-1:0] dataBus,
  output logic [DATA_W-1:0] addrDPT,
  output logic [DATA_W-1:0] outDPT,
  output logic [2:0]        cf,
  output logic [DATA_W-1:0] AccOut
);
  logic [DATA_W-1:0] regFile_port_a, regFile_port_b, alu_porta, alu_portb;
  logic [DATA_W-1:0] aluResult, MBRout, StkOut, mbr_bus;
  logic [2:0]        cf_in;
  logic [4:0]        shAmt;

  regfile #(.NREGS(NREGS), .DATA_W(DATA_W)) u_rf (
    .clk, .rst_n,
    .Asel(execBundle.Asel), .Bsel(execBundle.Bsel), .Csel(execBundle.Csel),
    .RegFileWr(execBundle.RegFileWr), .busC(dataBus),
    .busA(regFile_port_a), .busB(regFile_port_b)
  );

  assign alu_porta = decodeBundle.portAsel ? AccOut : regFile_port_a;
  assign alu_portb = decodeBundle.portBsel ? AccOut : regFile_port_b;
  assign shAmt     = decodeBundle.shiftCntSrc ? alu_portb[4:0] : decodeBundle.shiftCnt;

  alu #(.DATA_W(DATA_W)) u_alu (
    .ALUsel(execBundle.ALUsel), .porta(alu_porta), .portb(alu_portb), .shAmt,
    .result(aluResult), .cf_in
  );

  enable_reg #(.W(3)) u_cf (
    .clk, .rst_n, .en(execBundle.CFen), .d(cf_in), .q(cf));

  enable_reg #(.W(DATA_W)) u_acc (
    .clk, .rst_n, .en(execBundle.ACCen), .d(aluResult), .q(AccOut));

  enable_reg #(.W(DATA_W)) u_mar (
    .clk, .rst_n, .en(execBundle.MARen), .d(dataBus), .q(addrDPT));

  assign mbr_bus = execBundle.MBRsel ? inDPT : dataBus;

  enable_reg #(.W(DATA_W)) u_mbr (
    .clk, .rst_n, .en(execBundle.MBRen), .d(mbr_bus), .q(MBRout));

  assign outDPT = MBRout;

  stack #(.DEPTH(STACK_DEPTH), .DATA_W(DATA_W)) u_stack (
    .clk, .rst_n,
    .STKpush(execBundle.STKpush), .stkInc(execBundle.stkInc),
    .stkDec(execBundle.stkDec), .STKpop(execBundle.STKpop),
    .PCin(DATA_W'(PCout)), .StkOut
  );

  always_comb begin
    unique case (execBundle.DATAsel)
      DS_ACC:  dataBus = AccOut;
      DS_MBR:  dataBus = MBRout;
      DS_STK:  dataBus = StkOut;
      DS_CTRL: dataBus = DATA_W'(ctrlData);
      default: dataBus = AccOut;
    endcase
  end
endmodule
