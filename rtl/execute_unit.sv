// execute_unit -- the state machine of the Micro6 control unit.
//
// For every instruction the machine runs Reading -> Decoding -> gxs1 ..
// gxsn, where gxs1..gxsn are the execute states of the instruction's group:
//   * Reading (one cycle): IRen copies the fetched word into the IR and
//     ReadInstr tells the fetch unit to fetch the next word.
//   * Decoding (one cycle): the decode bundle computed from the new IR
//     contents is stored; it supplies the default values of the execute
//     bundle (register selects, ALU operation, DATAsel, MBRsel).
//   * gxs1..gxsn (S_EXEC plus a step counter): the clocked control signals
//     of the group, in the sequences listed below.
//   * After gxsn the machine returns to Reading if the fetch unit holds a
//     valid instruction (vldInstr) and otherwise waits in Idle (a stall)
//     until vldInstr rises.
//
// Group sequences (step: signals asserted):
//   G_NOP    1: -
//   G_ALU    1: ACCen, CFen
//   G_ALU_ST 1: ACCen, CFen   2: DATAsel=ACC, RegFileWr
//   G_LOAD   1: DATAsel=CTRL, MARen   2: memRd until memAck, MBRen on memAck
//            3: DATAsel=MBR, RegFileWr
//   G_STORE  1: DATAsel=CTRL, MARen   2: ALUsel=PASSA, ACCen
//            3: DATAsel=ACC, MBRen   4: memWr until memAck
//   G_JUMP   1: wait for vldInstr   2: DATAsel=CTRL, PCen, ReadInstr
//   G_CALL   1: wait for vldInstr   2: STKpush, stkInc
//            3: DATAsel=CTRL, PCen, ReadInstr
//   G_RET    1: wait for vldInstr   2: stkDec
//            3: DATAsel=STK, STKpop, PCen, ReadInstr
// A taken branch first waits for the word the fetch unit is prefetching,
// then loads the PC and discards that word with a ReadInstr pulse, so that
// the fetch unit restarts at the new PC. A call pushes PCout, which then
// holds the return address (call address plus one).
//
// Interface: clk, rst_n (active-low, synchronous); vldInstr from and
// ReadInstr to the fetch unit; decodeBundle from the decode function;
// memAck from the memory traffic controller for data accesses; execBundle
// and ctrlData (the stored memAddr, data_bus_inport3) to the datapath;
// state and step for observation.
// The Idle/Reading/Decoding/gxs structure, the one-cycle Reading and
// Decoding states, ReadInstr in Reading and the stall in Idle follow the
// Micro6 lab; the group sequences are this design's own choice.
module execute_unit
  import micro_control_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            vldInstr,
  output logic            ReadInstr,
  input  decode_bundle_t  decodeBundle,
  input  logic            memAck,
  output execute_bundle_t execBundle,
  output addr_t           ctrlData,
  output ctrl_state_e     state,
  output logic [2:0]      step
);
  decode_bundle_t dec_q;
  logic           last;     // current group state is gxsn
  logic           advance;  // leave the current group state

  // Sequencer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= 3'd1;
      dec_q <= '0;
    end else begin
      case (state)
        S_IDLE:     if (vldInstr) state <= S_READING;
        S_READING:  state <= S_DECODING;
        S_DECODING: begin
          dec_q <= decodeBundle;
          state <= S_EXEC;
          step  <= 3'd1;
        end
        S_EXEC: if (advance) begin
          if (last) begin
            step  <= 3'd1;
            state <= (vldInstr && !ReadInstr) ? S_READING : S_IDLE;
          end else begin
            step <= step + 3'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Control signals of the current state.
  always_comb begin
    execBundle           = '0;
    execBundle.Asel      = dec_q.Asel;
    execBundle.Bsel      = dec_q.Bsel;
    execBundle.Csel      = dec_q.Csel;
    execBundle.ALUsel    = dec_q.ALUsel;
    execBundle.DATAsel   = dec_q.DATAsel;
    execBundle.MBRsel    = dec_q.MBRsel;
    ReadInstr            = 1'b0;
    last                 = 1'b1;
    advance              = 1'b1;

    case (state)
      S_READING: begin
        execBundle.IRen = 1'b1;
        ReadInstr       = 1'b1;
      end
      S_EXEC: case (dec_q.instrGroup)
        G_ALU: begin
          execBundle.ACCen = 1'b1;
          execBundle.CFen  = dec_q.CFen;
        end
        G_ALU_ST: begin
          last = (step == 3'd2);
          if (step == 3'd1) begin
            execBundle.ACCen = 1'b1;
            execBundle.CFen  = dec_q.CFen;
          end else begin
            execBundle.DATAsel   = DS_ACC;
            execBundle.RegFileWr = 1'b1;
          end
        end
        G_LOAD: begin
          last = (step == 3'd3);
          case (step)
            3'd1: begin
              execBundle.DATAsel = DS_CTRL;
              execBundle.MARen   = 1'b1;
            end
            3'd2: begin
              execBundle.memRd  = 1'b1;
              execBundle.MBRsel = 1'b1;
              execBundle.MBRen  = memAck;
              advance           = memAck;
            end
            default: begin
              execBundle.DATAsel   = DS_MBR;
              execBundle.RegFileWr = 1'b1;
            end
          endcase
        end
        G_STORE: begin
          last = (step == 3'd4);
          case (step)
            3'd1: begin
              execBundle.DATAsel = DS_CTRL;
              execBundle.MARen   = 1'b1;
            end
            3'd2: begin
              execBundle.ALUsel = ALU_PASSA;
              execBundle.ACCen  = 1'b1;
            end
            3'd3: begin
              execBundle.DATAsel = DS_ACC;
              execBundle.MBRsel  = 1'b0;
              execBundle.MBRen   = 1'b1;
            end
            default: begin
              execBundle.memWr = 1'b1;
              advance          = memAck;
            end
          endcase
        end
        G_JUMP, G_CALL, G_RET: begin
          last = (dec_q.instrGroup == G_JUMP) ? (step == 3'd2) : (step == 3'd3);
          if (step == 3'd1) begin
            advance = vldInstr;
          end else if (!last) begin
            execBundle.STKpush = (dec_q.instrGroup == G_CALL);
            execBundle.stkInc  = (dec_q.instrGroup == G_CALL);
            execBundle.stkDec  = (dec_q.instrGroup == G_RET);
          end else begin
            execBundle.DATAsel = (dec_q.instrGroup == G_RET) ? DS_STK : DS_CTRL;
            execBundle.STKpop  = (dec_q.instrGroup == G_RET);
            execBundle.PCen    = 1'b1;
            ReadInstr          = 1'b1;
          end
        end
        default: ;  // G_NOP: one empty state
      endcase
      default: ;
    endcase
  end

  assign ctrlData = dec_q.memAddr;

  // Data memory handshake: a read and a write are never requested together.
  a_rd_wr_exclusive : assert property (@(posedge clk) disable iff (!rst_n)
    !(execBundle.memRd && execBundle.memWr));
endmodule
