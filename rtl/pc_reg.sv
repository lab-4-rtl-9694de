// pc_reg -- program counter of the Micro6 CPU.
//
// Holds the address of the next instruction word the fetch unit reads; its
// value is the fetch address offered to the memory traffic controller and
// the value pushed on the stack by a call. PCInc from the fetch unit
// increments it; PCen from the execute unit loads it from the data bus
// (jump, call, return). A load wins over an increment in the same cycle.
//
// Interface: clk, rst_n (active-low, synchronous), PCInc, PCen, dataIn;
// PCout. Parameters: ADDR_W (16, the width of memAddr), RESET_ADDR (0).
// Timing: PCout changes one clock edge after PCInc or PCen.
// PCInc and the load from the data bus follow the Micro6 figures; the
// priority, width and reset value are this design's choice.
module pc_reg #(
  parameter int unsigned      ADDR_W     = 16,
  parameter logic [ADDR_W-1:0] RESET_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              PCInc,
  input  logic              PCen,
  input  logic [ADDR_W-1:0] dataIn,
  output logic [ADDR_W-1:0] PCout
);
  always_ff @(posedge clk) begin
    if (!rst_n)     PCout <= RESET_ADDR;
    else if (PCen)  PCout <= dataIn;
    else if (PCInc) PCout <= PCout + 1'b1;
  end
endmodule
