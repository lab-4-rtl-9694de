// tb_micro6_control -- end-to-end test of the Micro6 instruction side.
//
// The top runs at its default parameters. The testbench stands in for the
// parts outside it:
//   * memory: every address holds a word computed from the address by a
//     hash (a random program over the whole 16-bit page-0 address space);
//     instruction and data requests are answered after 0 to 3 wait cycles;
//   * data bus: carries ctrlData when DATAsel selects the control unit and
//     the top of a return-address stack model when it selects the stack;
//   * stack: pushes PCout on STKpush, pops on STKpop;
//   * condition check: cTrue is a random bit, held for each instruction.
// An architectural reference walks the program: for each instruction it
// predicts the address of the next one (fall-through, taken branch or
// call, return) and checks the word copied into the IR, the branch target
// and pushed return address on the data bus, the page-0 address loaded into
// MAR, the number of register-file writes and memory accesses, and that the
// IR holds still while an instruction executes. Every mechanism must occur:
// each instruction group, taken and untaken branches, the stall in Idle,
// memory wait cycles and the discard of a prefetched word.
`timescale 1ns/1ps
module tb_micro6_control;
  import micro_control_pkg::*;

  localparam int N_INSTR = 4000;

  logic            clk = 0, rst_n = 0;
  addr_t           fetchAddr, ctrlData, dataBus;
  logic            imemRd, imemAck = 0, dmemAck = 0, cTrue = 0;
  instr_t          imemData = '0, instrRegOut;
  execute_bundle_t eb;
  decode_bundle_t  db;
  logic            vldInstr, ReadInstr;
  ctrl_state_e     ctrlState;
  logic [2:0]      ctrlStep;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_group[8], n_taken = 0, n_untaken = 0, n_stall = 0, n_iwait = 0, n_dwait = 0;
  int n_discard = 0, n_instr = 0;

  micro6_control dut (
    .clk, .rst_n, .fetchAddr, .imemRd, .imemAck, .imemData, .dmemAck, .cTrue,
    .dataBus, .execBundle(eb), .decodeBundle(db), .ctrlData, .vldInstr, .ReadInstr,
    .instrRegOut, .ctrlState, .ctrlStep);

  always #5 clk = ~clk;

  initial begin
    repeat (N_INSTR * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d instructions", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Program word at an address: a 32-bit mix of the address picks the
  // opcode class (ALU/shift 50%, load 9%, store 9%, branch 16%, return 6%,
  // no-op 6%, undefined opcode 3%) and fills the remaining fields.
  function automatic instr_t word_at(addr_t a);
    logic [31:0] h;
    logic [4:0]  k, op;
    h = 32'(a) ^ 32'h6a09_e667;
    h = h ^ (h >> 16); h = h * 32'h85eb_ca6b;
    h = h ^ (h >> 13); h = h * 32'hc2b2_ae35;
    h = h ^ (h >> 16);
    k = h[31:27];
    if (k < 2)       op = 5'd0;
    else if (k < 18) op = 5'(1 + (k - 2) % 8);
    else if (k < 21) op = 5'd9;
    else if (k < 24) op = 5'd10;
    else if (k < 29) op = 5'd11;
    else if (k < 31) op = 5'd12;
    else             op = 5'd13;
    return {op, h[26:0] ^ {h[10:0], h[31:16]}};
  endfunction

  // Return-address stack model. A pop from the empty stack yields an
  // address that changes with every instruction, to restart the program
  // somewhere new.
  addr_t stk[$];
  function automatic addr_t empty_ret(int n);
    return 16'(n * 40503);
  endfunction
  assign dataBus = (eb.DATAsel == DS_STK)  ? ((stk.size() > 0) ? stk[$] : empty_ret(n_instr)) :
                   (eb.DATAsel == DS_CTRL) ? ctrlData : 16'hDEAD;

  // A push or pop of one cycle is applied at the next falling edge, after
  // the clock edge that ends the cycle, so the stack never changes in the
  // same time step as the flip-flops sample the data bus.
  logic  push_q = 0, pop_q = 0;
  addr_t push_val;
  always @(negedge clk) begin
    if (push_q) stk.push_back(push_val);
    if (pop_q && stk.size() > 0) void'(stk.pop_back());
    push_q   = rst_n && eb.STKpush;
    pop_q    = rst_n && eb.STKpop;
    push_val = fetchAddr;
  end

  // Instruction memory.
  initial begin
    int lat;
    forever begin
      @(negedge clk);
      imemAck = 0;
      if (rst_n && imemRd) begin
        lat = $urandom_range(0, 3);
        n_iwait += lat;
        repeat (lat) @(negedge clk);
        imemData = word_at(fetchAddr);
        imemAck  = 1;
      end
    end
  end

  // Data memory: only the handshake matters here.
  initial begin
    int lat;
    forever begin
      @(negedge clk);
      dmemAck = 0;
      if (rst_n && (eb.memRd || eb.memWr)) begin
        lat = $urandom_range(0, 3);
        n_dwait += lat;
        repeat (lat) @(negedge clk);
        dmemAck = 1;
      end
    end
  end

  // Architectural reference and checks.
  initial begin
    addr_t  exp_addr, ret_stack[$], target;
    instr_t w;
    logic [4:0] op;
    logic   taken, call;
    int     wr, rd, wt, marl, pushes;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_addr = '0;
    @(negedge clk);
    while (n_instr < N_INSTR) begin
      // wait for Reading, counting stalls
      if (n_instr > 0 && ctrlState inside {S_IDLE, S_READING})
        check("IR holds the last instruction until Reading", instrRegOut === w);
      if (ctrlState != S_READING) begin
        if (ctrlState == S_IDLE) n_stall++;
        @(negedge clk);
        continue;
      end
      @(negedge clk);  // Decoding
      w = word_at(exp_addr);
      cTrue = 1'($urandom);
      check("IR holds the word of the expected address", instrRegOut === w);
      n_instr++;
      op = w[31:27];
      target = w[26:11];
      taken = (op == 5'd11) && cTrue;
      call  = taken && w[7];
      if (op == 5'd11) begin if (cTrue) n_taken++; else n_untaken++; end
      n_group[db.instrGroup]++;
      // execute states: count the datapath actions
      wr = 0; rd = 0; wt = 0; marl = 0; pushes = 0;
      @(negedge clk);
      while (ctrlState == S_EXEC) begin
        check("IR stable during execution", instrRegOut === w);
        if (eb.RegFileWr) wr++;
        if (eb.memRd && dmemAck) rd++;
        if (eb.memWr && dmemAck) wt++;
        if (eb.MARen) begin
          marl++;
          check("MAR gets the page-0 address", dataBus === target);
        end
        if (eb.STKpush) begin
          pushes++;
          check("call pushes the return address", fetchAddr === exp_addr + 16'd1);
        end
        if (eb.PCen) begin
          if (op == 5'd12)
            check("return target", dataBus === ((ret_stack.size() > 0) ? ret_stack[$] : empty_ret(n_instr)));
          else
            check("branch target", dataBus === target);
          if (vldInstr && ReadInstr) n_discard++;
        end
        @(negedge clk);
      end
      // instruction-level effects
      case (op)
        5'd1, 5'd2, 5'd3, 5'd4, 5'd5, 5'd6, 5'd7, 5'd8:
          check("ALU writes register only with StoreC", wr == int'(w[16]));
        5'd9:  check("load: one read, one write", rd == 1 && wr == 1 && marl == 1);
        5'd10: check("store: one write access", wt == 1 && wr == 0 && marl == 1);
        default: check("no register write", wr == 0 && rd == 0 && wt == 0);
      endcase
      check("push only on a call", pushes == int'(call));
      // next address
      if (call) begin
        ret_stack.push_back(exp_addr + 16'd1);
        exp_addr = target;
      end else if (taken) begin
        exp_addr = target;
      end else if (op == 5'd12) begin
        exp_addr = (ret_stack.size() > 0) ? ret_stack.pop_back() : empty_ret(n_instr);
      end else begin
        exp_addr = exp_addr + 16'd1;
      end
    end
    for (int g = 0; g < 8; g++) begin
      check("every instruction group occurred", n_group[g] > 0);
    end
    check("taken branch occurred", n_taken > 0);
    check("untaken branch occurred", n_untaken > 0);
    check("stall in Idle occurred", n_stall > 0);
    check("instruction memory wait occurred", n_iwait > 0);
    check("data memory wait occurred", n_dwait > 0);
    check("prefetched word discarded", n_discard > 0);
    $display("instructions %0d, groups nop %0d alu %0d alu_st %0d load %0d store %0d",
             n_instr, n_group[0], n_group[1], n_group[2], n_group[3], n_group[4]);
    $display("jump %0d call %0d ret %0d, taken %0d untaken %0d", n_group[5], n_group[6],
             n_group[7], n_taken, n_untaken);
    $display("stall cycles %0d, imem waits %0d, dmem waits %0d, discards %0d",
             n_stall, n_iwait, n_dwait, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
