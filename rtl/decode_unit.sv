// decode_unit -- the Micro6 decode function as a module.
//
// Purely combinational: it applies micro_control_pkg::decodeInstr() to the
// instruction register contents and the branch condition cTrue and presents
// the decode bundle. case_1 of the function forms the instruction group and
// CFen; case_2 forms the register selects, ALU operation, shift count and
// source, ALU port selects, STKen, DATAsel, MBRsel and memAddr.
//
// Interface: instReg (32 bits) and cTrue in, decodeBundle out.
// Timing: no clock; the result is valid in the same cycle as its inputs and
// is sampled by the execute unit in its Decoding state.
// The decode structure follows the Micro6 lab; the opcode values and field
// positions are this design's choice (see micro_control_pkg).
module decode_unit
  import micro_control_pkg::*;
(
  input  instr_t         instReg,
  input  logic           cTrue,
  output decode_bundle_t decodeBundle
);
  always_comb decodeBundle = decodeInstr(instReg, cTrue);
endmodule
