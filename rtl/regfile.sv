// regfile -- Micro6 register file: NREGS registers of DATA_W bits with two
// read ports and one write port.
//
// busA and busB read the registers selected by Asel and Bsel without a
// clock; busC is written into the register selected by Csel at the clock
// edge when RegFileWr is high. A write and a read of the same register in
// one cycle return the old value. Reset clears every register.
//
// Parameters: NREGS (32, from the 5-bit selects), DATA_W (16).
// Timing: writes take effect at the next clock edge.
// Port names and the three ports follow the Micro6 architecture; the data
// width and the reset are this design's choice.
module regfile #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] Asel,
  input  logic [$clog2(NREGS)-1:0] Bsel,
  input  logic [$clog2(NREGS)-1:0] Csel,
  input  logic                     RegFileWr,
  input  logic [DATA_W-1:0]        busC,
  output logic [DATA_W-1:0]        busA,
  output logic [DATA_W-1:0]        busB
);
  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (RegFileWr) begin
      regs[Csel] <= busC;
    end
  end

  assign busA = regs[Asel];
  assign busB = regs[Bsel];
endmodule
