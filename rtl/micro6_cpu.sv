// micro6_cpu -- the Micro6 CPU: instruction side (fetch unit, IR, PC,
// decode function, execute state machine) and datapath (register file,
// ALU, condition flags, ACC, MAR, MBR, stack, data bus).
//
// The control side fetches, decodes and sequences each instruction; the
// datapath carries out the register transfers the execute bundle asks for.
// The data bus ties them together: it carries branch targets and page-0
// addresses from the control unit into the PC and MAR, and return
// addresses from the stack into the PC.
//
// Outside this module are the memory traffic controller (two request/
// acknowledge channels, instruction and data) and the condition check,
// which receives the flags cf and returns cTrue.
//
// Interface: clk, rst_n (active-low, synchronous);
//   instruction side: fetchAddr, imemRd out; imemAck, imemData in;
//   data side: dmemAddr (MAR), dmemWdata (MBR), dmemRd, dmemWr out;
//              dmemAck, dmemRdata in;
//   condition check: cf out, cTrue in (stable at least through Decoding);
//   observation: AccOut, ctrlState, instrRegOut.
// Timing: 3 to 6 cycles per instruction plus memory wait cycles and Idle
// (stall) cycles. Parameters as in micro6_datapath; the address width is
// fixed at 16 bits by memAddr.
// The division into blocks follows the Micro6 architecture; widths, sizes
// and the memory protocol are this design's choice.
module micro6_cpu
  import micro_control_pkg::*;
#(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned NREGS       = 32,
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction memory
  output addr_t             fetchAddr,
  output logic              imemRd,
  input  logic              imemAck,
  input  instr_t            imemData,
  // data memory
  output logic [DATA_W-1:0] dmemAddr,
  output logic [DATA_W-1:0] dmemWdata,
  output logic              dmemRd,
  output logic              dmemWr,
  input  logic              dmemAck,
  input  logic [DATA_W-1:0] dmemRdata,
  // condition check
  output logic [2:0]        cf,
  input  logic              cTrue,
  // observation
  output logic [DATA_W-1:0] AccOut,
  output ctrl_state_e       ctrlState,
  output instr_t            instrRegOut
);
  execute_bundle_t   execBundle;
  decode_bundle_t    decodeBundle;
  addr_t             ctrlData;
  logic [DATA_W-1:0] dataBus;
  logic              vldInstr, ReadInstr;
  logic [2:0]        ctrlStep;

  micro6_control u_ctrl (
    .clk, .rst_n,
    .fetchAddr, .imemRd, .imemAck, .imemData,
    .dmemAck, .cTrue,
    .dataBus(addr_t'(dataBus)), .execBundle, .decodeBundle, .ctrlData,
    .vldInstr, .ReadInstr, .instrRegOut, .ctrlState, .ctrlStep
  );

  micro6_datapath #(.DATA_W(DATA_W), .NREGS(NREGS), .STACK_DEPTH(STACK_DEPTH)) u_dp (
    .clk, .rst_n,
    .execBundle, .decodeBundle, .ctrlData, .PCout(fetchAddr),
    .inDPT(dmemRdata), .dataBus, .addrDPT(dmemAddr), .outDPT(dmemWdata),
    .cf, .AccOut
  );

  assign dmemRd = execBundle.memRd;
  assign dmemWr = execBundle.memWr;
endmodule
