// enable_reg -- register with load enable and synchronous reset, used for
// the Micro6 datapath registers (CF, ACC, MAR, MBR).
//
// q takes d at the clock edge when en is high and holds otherwise; reset
// (rst_n low) clears it. Parameter W is the width.
module enable_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
