// micro_control_pkg -- types and the instruction decode function of the
// Micro6 control unit.
//
// The control unit is split into a fetch unit, a decode function and an
// execute unit. This package holds what they share:
//   * the decode bundle and the execute bundle as packed structs (the signal
//     lists and widths of both bundles follow the Micro6 bundle table),
//   * the instruction group and ALU operation enums,
//   * one packed struct per instruction format, laid over the instruction
//     word in place of field aliases, and
//   * decodeInstr(), the pure combinational decode function. It is built
//     from two case statements: case_1 is compact (one choice may cover
//     several opcodes) and yields only instrGroup and CFen; case_2 has one
//     choice per opcode and yields every other field, on top of defaults.
//
// The 5-bit opcode in bits 31:27, the field names of the formats, the
// bundle contents and the two-case structure follow the Micro6 lab text.
// The bit positions of the remaining fields, the opcode values, the ALU
// operation list and the instruction groups are this design's own choice,
// because the Micro6 instruction-set table is not part of the description.
//
// Instruction formats (bit 31 left):
//   Format1 (register / shift):
//     OPCODE[31:27] IX[26] S[25] D[24] CNT[23:19] AACC[18] BACC[17]
//     StoreC[16] -[15] A[14:10] B[9:5] C[4:0]
//   Format2 (branch / call):
//     OPCODE[31:27] PAGE0[26:11] CMASK[10:8] ST[7] -[6:0]
//   Format3 (load / store):
//     OPCODE[31:27] PAGE0[26:11] C[10:6] -[5:0]
package micro_control_pkg;

  localparam int unsigned INSTR_W = 32;
  localparam int unsigned REG_W   = 5;   // Asel, Bsel, Csel, shiftCnt are 4:0
  localparam int unsigned ADDR_W  = 16;  // memAddr is 15:0
  localparam int unsigned CMASK_W = 3;   // one bit per flag: neg, ovf, zro

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [REG_W-1:0]   regsel_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  // Opcodes (5 bits, assumed encoding).
  typedef enum logic [4:0] {
    OP_NOP   = 5'h00,
    OP_ADD   = 5'h01,
    OP_SUB   = 5'h02,
    OP_AND   = 5'h03,
    OP_OR    = 5'h04,
    OP_XOR   = 5'h05,
    OP_NOT   = 5'h06,
    OP_MOV   = 5'h07,
    OP_SHIFT = 5'h08,
    OP_LOAD  = 5'h09,
    OP_STORE = 5'h0A,
    OP_BRA   = 5'h0B,  // conditional branch; ST=1 makes it a call
    OP_RET   = 5'h0C
  } opcode_e;

  // ALU operations selected by ALUsel.
  typedef enum logic [3:0] {
    ALU_PASSA = 4'd0,
    ALU_PASSB = 4'd1,
    ALU_ADD   = 4'd2,
    ALU_SUB   = 4'd3,
    ALU_AND   = 4'd4,
    ALU_OR    = 4'd5,
    ALU_XOR   = 4'd6,
    ALU_NOT   = 4'd7,
    ALU_SHL   = 4'd8,
    ALU_SHR   = 4'd9
  } alu_op_e;

  // Instruction groups: instructions that need the same sequence of
  // clocked control signals in the execute unit share one group.
  typedef enum logic [2:0] {
    G_NOP    = 3'd0,  // no operation, undefined opcode, branch not taken
    G_ALU    = 3'd1,  // ALU or shift, result kept in ACC only
    G_ALU_ST = 3'd2,  // ALU or shift, result also written to register C
    G_LOAD   = 3'd3,  // register C <- mem[PAGE0]
    G_STORE  = 3'd4,  // mem[PAGE0] <- register C
    G_JUMP   = 3'd5,  // PC <- PAGE0 (branch taken)
    G_CALL   = 3'd6,  // push PC, PC <- PAGE0 (branch taken, ST=1)
    G_RET    = 3'd7   // PC <- pop
  } instr_group_e;

  // Data bus source selected by DATAsel.
  typedef enum logic [1:0] {
    DS_ACC  = 2'd0,   // AccOut
    DS_MBR  = 2'd1,   // MBRout
    DS_STK  = 2'd2,   // StkOut (data_bus_inport2)
    DS_CTRL = 2'd3    // memAddr from the control unit (data_bus_inport3)
  } data_sel_e;

  // States of the execute unit. S_EXEC is one of the group states
  // gxs1..gxsn; the execute unit numbers them with a separate step counter.
  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,  // stall: no valid instruction from the fetch unit
    S_READING  = 2'd1,  // IR <- fetched word, ReadInstr pulse (one cycle)
    S_DECODING = 2'd2,  // decode bundle sampled (one cycle)
    S_EXEC     = 2'd3   // group states gxs1..gxsn
  } ctrl_state_e;

  // Decode bundle: produced by decodeInstr().
  typedef struct packed {
    instr_group_e instrGroup;
    regsel_t      Asel;
    regsel_t      Bsel;
    regsel_t      Csel;
    alu_op_e      ALUsel;
    regsel_t      shiftCnt;
    logic         shiftCntSrc;
    logic         portAsel;
    logic         portBsel;
    logic         CFen;
    logic         STKen;
    data_sel_e    DATAsel;
    logic         MBRsel;
    addr_t        memAddr;
  } decode_bundle_t;

  // Execute bundle: produced by the execute unit, clocked control signals
  // for the datapath.
  typedef struct packed {
    regsel_t   Asel;
    regsel_t   Bsel;
    regsel_t   Csel;
    alu_op_e   ALUsel;
    logic      CFen;
    data_sel_e DATAsel;
    logic      MBRsel;
    logic      RegFileWr;
    logic      stkInc;
    logic      stkDec;
    logic      ACCen;
    logic      MARen;
    logic      MBRen;
    logic      PCen;
    logic      IRen;
    logic      STKpop;
    logic      STKpush;
    logic      memRd;
    logic      memWr;
  } execute_bundle_t;

  // ---- instruction formats: one packed struct per format, laid over the
  // instruction word (the counterpart of field aliases) ----
  typedef struct packed {
    logic [4:0] opcode;
    logic       ix;       // index register
    logic       s;        // shift count source
    logic       d;        // shift direction (1: right)
    regsel_t    cnt;      // shift count
    logic       aacc;     // ALU port A is ACC
    logic       bacc;     // ALU port B is ACC
    logic       storec;   // store the result in C
    logic       unused;
    regsel_t    a;        // register file port A
    regsel_t    b;        // register file port B
    regsel_t    c;        // register file write port C
  } format1_t;

  typedef struct packed {
    logic [4:0]         opcode;
    addr_t              page0;   // page-0 address (branch target)
    logic [CMASK_W-1:0] cmask;   // condition mask
    logic               st;      // enable stack (call)
    logic [6:0]         unused;
  } format2_t;

  typedef struct packed {
    logic [4:0] opcode;
    addr_t      page0;           // page-0 address of the operand
    regsel_t    c;               // register loaded or stored
    logic [5:0] unused;
  } format3_t;

  // ---- decode function ----
  function automatic decode_bundle_t decodeInstr(instr_t instReg, logic cTrue);
    decode_bundle_t d;
    format1_t       f1;
    format2_t       f2;
    format3_t       f3;
    logic [4:0]     opcode;
    f1     = format1_t'(instReg);
    f2     = format2_t'(instReg);
    f3     = format3_t'(instReg);
    opcode = f1.opcode;

    // Defaults: the Format1 fields. Fields an instruction does not use are
    // ignored by the execute unit.
    d.instrGroup  = G_NOP;
    d.Asel        = f1.a;
    d.Bsel        = f1.b;
    d.Csel        = f1.c;
    d.ALUsel      = ALU_PASSA;
    d.shiftCnt    = f1.cnt;
    d.shiftCntSrc = f1.s;
    d.portAsel    = f1.aacc;
    d.portBsel    = f1.bacc;
    d.CFen        = 1'b0;
    d.STKen       = 1'b0;
    d.DATAsel     = DS_ACC;
    d.MBRsel      = 1'b0;
    d.memAddr     = f2.page0;

    // case_1: instruction group and CFen (several opcodes per choice).
    case (opcode) inside
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV, OP_SHIFT: begin
        d.instrGroup = f1.storec ? G_ALU_ST : G_ALU;
        d.CFen       = 1'b1;
      end
      OP_LOAD:  d.instrGroup = G_LOAD;
      OP_STORE: d.instrGroup = G_STORE;
      OP_BRA:   d.instrGroup = !cTrue        ? G_NOP :
                               f2.st ? G_CALL : G_JUMP;
      OP_RET:   d.instrGroup = G_RET;
      default:  d.instrGroup = G_NOP;
    endcase

    // case_2: all other outputs (one choice per opcode).
    case (opcode)
      OP_ADD:   d.ALUsel = ALU_ADD;
      OP_SUB:   d.ALUsel = ALU_SUB;
      OP_AND:   d.ALUsel = ALU_AND;
      OP_OR:    d.ALUsel = ALU_OR;
      OP_XOR:   d.ALUsel = ALU_XOR;
      OP_NOT:   d.ALUsel = ALU_NOT;
      OP_MOV:   d.ALUsel = ALU_PASSA;
      OP_SHIFT: d.ALUsel = f1.d ? ALU_SHR : ALU_SHL;
      OP_LOAD: begin
        d.Csel    = f3.c;
        d.MBRsel  = 1'b1;          // MBR takes the memory data
        d.DATAsel = DS_MBR;
      end
      OP_STORE: begin
        d.Asel     = f3.c; // register C is read through port A
        d.Csel     = f3.c;
        d.portAsel = 1'b0;
        d.ALUsel   = ALU_PASSA;
        d.MBRsel   = 1'b0;          // MBR takes the data bus
        d.DATAsel  = DS_ACC;
      end
      OP_BRA: begin
        d.DATAsel = DS_CTRL;        // branch target onto the data bus
        d.STKen   = f2.st;
      end
      OP_RET: begin
        d.DATAsel = DS_STK;
        d.STKen   = 1'b1;
      end
      default: ;
    endcase
    return d;
  endfunction

endpackage
