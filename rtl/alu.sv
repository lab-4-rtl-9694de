// alu -- Micro6 arithmetic and logic unit.
//
// Combinational. Computes ALUsel on the two ALU ports and reports three
// flags, cf_in = {neg, ovf, zro}: neg is the result's sign bit, zro is set
// for a zero result, ovf for a two's-complement overflow of ADD or SUB
// (zero for the other operations). The shifts move porta left or right
// (logical) by shAmt places; a count of DATA_W or more gives zero.
//
// Interface: ALUsel (alu_op_e), porta, portb, shAmt (5 bits); result,
// cf_in. Parameter DATA_W (16).
// The flag names and the ALU's place between the port multiplexers, ACC
// and CF follow the Micro6 architecture; the operation list and flag rules
// are this design's choice.
module alu
  import micro_control_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  alu_op_e           ALUsel,
  input  logic [DATA_W-1:0] porta,
  input  logic [DATA_W-1:0] portb,
  input  logic [4:0]        shAmt,
  output logic [DATA_W-1:0] result,
  output logic [2:0]        cf_in
);
  logic ovf;

  always_comb begin
    ovf = 1'b0;
    unique case (ALUsel)
      ALU_PASSA: result = porta;
      ALU_PASSB: result = portb;
      ALU_ADD: begin
        result = porta + portb;
        ovf    = (porta[DATA_W-1] == portb[DATA_W-1]) && (result[DATA_W-1] != porta[DATA_W-1]);
      end
      ALU_SUB: begin
        result = porta - portb;
        ovf    = (porta[DATA_W-1] != portb[DATA_W-1]) && (result[DATA_W-1] != porta[DATA_W-1]);
      end
      ALU_AND: result = porta & portb;
      ALU_OR:  result = porta | portb;
      ALU_XOR: result = porta ^ portb;
      ALU_NOT: result = ~porta;
      ALU_SHL: result = porta << shAmt;
      ALU_SHR: result = porta >> shAmt;
      default: result = porta;
    endcase
    cf_in = {result[DATA_W-1], ovf, result == '0};
  end
endmodule
