// micro6_control -- instruction side of the Micro6 CPU: fetch unit,
// instruction register, program counter and control unit.
//
// The fetch unit keeps the next instruction word ready and hands it to the
// control unit with the ReadInstr/vldInstr handshake; the word goes through
// the IR into the decode function, whose bundle the execute unit stores in
// its Decoding state and expands into the execute bundle, the clocked
// control signals of the datapath. The PC supplies the fetch address; the
// fetch unit increments it and the execute unit loads it from the data bus
// for jumps, calls and returns.
//
// The datapath (register file, ALU, condition flags, ACC, MBR, MAR, stack),
// the condition check and the memory traffic controller are outside this
// module and connect through its ports:
//   * execBundle   - clocked control signals of the datapath;
//   * decodeBundle - straight from the decode function; its fields that are
//                    not in the execute bundle (shiftCnt, shiftCntSrc,
//                    portAsel, portBsel, STKen, memAddr) go to the datapath
//                    from here;
//   * ctrlData     - the control unit's drive onto the data bus (memAddr of
//                    the current instruction);
//   * dataBus      - the data bus value the PC loads on PCen;
//   * cTrue        - the branch condition; hold it at least through the
//                    Decoding cycle;
//   * two memory request/acknowledge channels, instruction and data.
//
// Interface: clk, rst_n (active-low, synchronous); instruction memory:
// fetchAddr, imemRd out, imemAck, imemData in; data memory requests are
// execBundle.memRd/memWr with dmemAck in. Parameter RESET_ADDR is the first
// fetch address.
// Timing: an instruction takes Reading + Decoding + its group states, at
// least three cycles, plus Idle cycles while the fetch unit waits for
// memory.
// The split into units and their connections follow the Micro6
// architecture and its fetch and control path; the memory ports and the PC
// reset value are this design's choice.
module micro6_control
  import micro_control_pkg::*;
#(
  parameter addr_t RESET_ADDR = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory (memory traffic controller, fetch side)
  output addr_t           fetchAddr,
  output logic            imemRd,
  input  logic            imemAck,
  input  instr_t          imemData,
  // data memory acknowledge (memory traffic controller, data side)
  input  logic            dmemAck,
  // condition check
  input  logic            cTrue,
  // datapath
  input  addr_t           dataBus,
  output execute_bundle_t execBundle,
  output decode_bundle_t  decodeBundle,
  output addr_t           ctrlData,
  // observation
  output logic            vldInstr,
  output logic            ReadInstr,
  output instr_t          instrRegOut,
  output ctrl_state_e     ctrlState,
  output logic [2:0]      ctrlStep
);
  instr_t         fetchWord;
  logic           PCInc;

  fetch_unit u_fetch (
    .clk, .rst_n,
    .ReadInstr, .vldInstr, .instrWord(fetchWord),
    .memRd(imemRd), .memAck(imemAck), .memData(imemData),
    .PCInc
  );

  instr_reg u_ir (
    .clk, .rst_n,
    .IRen(execBundle.IRen), .instrIn(fetchWord), .instrOut(instrRegOut)
  );

  pc_reg #(.ADDR_W(ADDR_W), .RESET_ADDR(RESET_ADDR)) u_pc (
    .clk, .rst_n,
    .PCInc, .PCen(execBundle.PCen), .dataIn(dataBus), .PCout(fetchAddr)
  );

  decode_unit u_decode (
    .instReg(instrRegOut), .cTrue, .decodeBundle
  );

  execute_unit u_exec (
    .clk, .rst_n,
    .vldInstr, .ReadInstr, .decodeBundle,
    .memAck(dmemAck), .execBundle, .ctrlData,
    .state(ctrlState), .step(ctrlStep)
  );
endmodule
