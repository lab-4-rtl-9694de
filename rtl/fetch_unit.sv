// fetch_unit -- instruction fetch unit of the Micro6 control path.
//
// Keeps one instruction word ready for the control unit. After reset, and
// after every ReadInstr pulse, it requests the word at the current PC from
// the memory traffic controller (memRd held high until memAck) with
// vldInstr low; when memAck arrives it stores memData and raises vldInstr,
// which stays high until the next ReadInstr pulse. The control unit copies
// the stored word into the IR in the same cycle as it pulses ReadInstr, so
// the fetch of the next word overlaps the execution of the current one.
//
// PCInc is pulsed together with an accepted ReadInstr: the PC therefore
// always holds the address of the word being fetched or held here, i.e.
// the address of the executing instruction plus one.
//
// Interface: clk, rst_n (active-low, synchronous); control side ReadInstr
// in, vldInstr and instrWord out; memory side memRd out, memAck and memData
// in; PCInc out to the program counter.
// Timing: vldInstr falls the cycle after ReadInstr and rises the cycle after
// memAck; memRd rises the cycle after ReadInstr.
// The ReadInstr/vldInstr handshake follows the Micro6 lab; the memory
// request/acknowledge protocol and the timing of PCInc are this design's
// choice.
module fetch_unit
  import micro_control_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // control unit
  input  logic   ReadInstr,
  output logic   vldInstr,
  output instr_t instrWord,
  // memory traffic controller
  output logic   memRd,
  input  logic   memAck,
  input  instr_t memData,
  // program counter
  output logic   PCInc
);
  typedef enum logic {F_FETCH, F_VALID} fetch_state_e;
  fetch_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= F_FETCH;
      instrWord <= '0;
    end else begin
      case (state)
        F_FETCH: if (memAck) begin
          instrWord <= memData;
          state     <= F_VALID;
        end
        F_VALID: if (ReadInstr) state <= F_FETCH;
        default: state <= F_FETCH;
      endcase
    end
  end

  assign vldInstr = (state == F_VALID);
  assign memRd    = (state == F_FETCH);
  assign PCInc    = (state == F_VALID) && ReadInstr;

  // Handshake rules: ReadInstr only while an instruction is valid, memAck
  // only in answer to a pending read.
  a_read_when_valid : assert property (@(posedge clk) disable iff (!rst_n)
    ReadInstr |-> vldInstr);
  a_ack_when_read : assert property (@(posedge clk) disable iff (!rst_n)
    memAck |-> memRd);
endmodule
