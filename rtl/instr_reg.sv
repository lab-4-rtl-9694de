// instr_reg -- instruction register (IR) between the fetch unit and the
// control unit.
//
// A 32-bit register that loads the word offered by the fetch unit when the
// execute unit asserts IRen (in its Reading state) and holds it while the
// instruction is decoded and executed. Reset clears it to zero, which
// decodes as a no-operation.
//
// Interface: clk, rst_n (active-low, synchronous), IRen, instrIn; instrOut.
// Timing: instrOut changes one clock edge after IRen is sampled high.
// Its place between fetch unit and control follows the Micro6 architecture;
// the enable and reset behaviour are this design's choice.
module instr_reg
  import micro_control_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   IRen,
  input  instr_t instrIn,
  output instr_t instrOut
);
  always_ff @(posedge clk) begin
    if (!rst_n)    instrOut <= '0;
    else if (IRen) instrOut <= instrIn;
  end
endmodule
