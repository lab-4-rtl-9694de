// stack -- Micro6 return-address stack.
//
// A DEPTH-entry memory of DATA_W-bit words with a stack pointer that
// points at the next free entry. STKpush writes PCout into the entry at the
// stack pointer; stkInc and stkDec move the pointer up and down (modulo
// DEPTH, so an overflow overwrites the oldest entries and a pop from an
// empty stack reads a stale entry). StkOut always shows the entry at the
// pointer; STKpop marks the cycle in which the control unit takes it.
// The control unit pushes with STKpush+stkInc in one cycle and pops with
// stkDec, then STKpop one cycle later.
//
// Parameters: DEPTH (16), DATA_W (16). Interface: clk, rst_n, STKpush,
// stkInc, stkDec, STKpop, PCin; StkOut.
// Timing: writes and pointer moves take effect at the clock edge.
// The stack's inputs (PCout) and output (StkOut onto the data bus) follow
// the Micro6 architecture; depth, width and pointer rules are this
// design's choice.
module stack #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       STKpush,
  input  logic                       stkInc,
  input  logic                       stkDec,
  input  logic                       STKpop,
  input  logic [DATA_W-1:0]          PCin,
  output logic [DATA_W-1:0]          StkOut
);
  logic [DATA_W-1:0]          mem [DEPTH];
  logic [$clog2(DEPTH)-1:0]   sp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (STKpush) mem[sp] <= PCin;
      if (stkInc && !stkDec)      sp <= sp + 1'b1;
      else if (stkDec && !stkInc) sp <= sp - 1'b1;
    end
  end

  assign StkOut = mem[sp];

  // A pop takes the entry the previous stkDec uncovered.
  a_pop_after_dec : assert property (@(posedge clk) disable iff (!rst_n)
    STKpop |-> $past(stkDec));
endmodule
