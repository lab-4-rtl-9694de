// tb_micro6_cpu -- end-to-end test of the Micro6 CPU at its default
// parameters.
//
// The testbench supplies the memory traffic controller (instruction and
// data memories, each answering after 0 to 3 wait cycles) and the
// condition check (a random cTrue per instruction, true at address 0). The program is a
// pseudo-random word at every address of the 16-bit space, computed from
// the address; data memory starts with values computed from the address.
//
// An instruction-level model of the CPU, kept here, executes the same
// program: the ALU operations with ACC/register operands and StoreC, shifts
// with either count source, loads, stores, branches, calls and returns with
// a 16-entry wrapping stack. At every instruction boundary (Reading state)
// it compares the IR word, the accumulator, the flags and all 32 registers
// with the CPU's, and it checks the address and data of every data-memory
// access. The run fails unless each instruction group, both shift count
// sources, ACC as ALU operand, taken and untaken branches, stack overflow
// (more than 16 nested calls), stalls and memory wait cycles all occur.
`timescale 1ns/1ps
module tb_micro6_cpu;
  import micro_control_pkg::*;

  localparam int N_INSTR = 6000;

  logic        clk = 0, rst_n = 0;
  addr_t       fetchAddr;
  logic        imemRd, imemAck = 0, dmemRd, dmemWr, dmemAck = 0, cTrue = 0;
  instr_t      imemData = '0, instrRegOut;
  logic [15:0] dmemAddr, dmemWdata, dmemRdata = '0, AccOut;
  logic [2:0]  cf;
  ctrl_state_e ctrlState;

  int checks = 0, failures = 0, n_instr = 0;
  int n_group[8], n_taken = 0, n_untaken = 0, n_stall = 0, n_iwait = 0, n_dwait = 0;
  int n_src_reg = 0, n_acc_op = 0, max_depth = 0, depth = 0;

  micro6_cpu dut (
    .clk, .rst_n, .fetchAddr, .imemRd, .imemAck, .imemData,
    .dmemAddr, .dmemWdata, .dmemRd, .dmemWr, .dmemAck, .dmemRdata,
    .cf, .cTrue, .AccOut, .ctrlState, .instrRegOut);

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
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (instr %0d)", what, $time, n_instr);
    end
  endtask

  function automatic logic [31:0] mix(logic [31:0] x);
    x = x ^ (x >> 16); x = x * 32'h85eb_ca6b;
    x = x ^ (x >> 13); x = x * 32'hc2b2_ae35;
    return x ^ (x >> 16);
  endfunction

  // Program word at an address. Opcode classes: ALU/shift 56%, load 9%,
  // store 9%, branch 16%, return 3%, no-op 3%, undefined 3%. Address 0 holds
  // a call (the condition check reports true there), so that a return from
  // an empty stack re-enters the program through a branch.
  function automatic instr_t word_at(addr_t a);
    logic [31:0] h, g;
    logic [4:0]  k, op;
    h = mix(32'(a) ^ 32'h6a09_e667);
    g = mix(h);
    k = h[31:27];
    if (k < 1)       op = 5'd0;
    else if (k < 19) op = 5'(1 + (k - 1) % 8);
    else if (k < 22) op = 5'd9;
    else if (k < 25) op = 5'd10;
    else if (k < 30) op = 5'd11;
    else if (k < 31) op = 5'd12;
    else             op = 5'd13;
    if (a == '0) begin
      op = 5'd11;
      g[7] = 1'b1;
    end
    return {op, g[26:0]};
  endfunction

  // Data memory.
  logic [15:0] dmem [addr_t];
  function automatic logic [15:0] dmem_rd(addr_t a);
    if (dmem.exists(a)) return dmem[a];
    return 16'(mix(32'(a) + 32'h3c6e_f372));
  endfunction

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

  // Data memory: a write is stored at the falling edge of its acknowledge.
  initial begin
    int lat;
    forever begin
      @(negedge clk);
      dmemAck = 0;
      if (rst_n && (dmemRd || dmemWr)) begin
        lat = $urandom_range(0, 3);
        n_dwait += lat;
        repeat (lat) @(negedge clk);
        if (dmemWr) dmem[dmemAddr] = dmemWdata;
        dmemRdata = dmem_rd(dmemAddr);
        dmemAck   = 1;
      end
    end
  end

  // Instruction-level model.
  logic [15:0] R [32];
  logic [15:0] ACC, STK [16];
  logic [2:0]  CF;
  logic [3:0]  SP;
  addr_t       PC;

  task automatic model_step(instr_t w, logic ct);
    logic [4:0]  op, cnt;
    logic [15:0] a, b, r;
    logic        ovf;
    int          full;
    op = w[31:27];
    a  = w[18] ? ACC : R[w[14:10]];
    b  = w[17] ? ACC : R[w[9:5]];
    PC = PC + 16'd1;
    if (op >= 5'd1 && op <= 5'd8) begin
      if (w[18] || w[17]) n_acc_op++;
      ovf = 0;
      cnt = w[25] ? b[4:0] : w[23:19];
      if (op == 5'd8 && w[25]) n_src_reg++;
      case (op)
        5'd1: begin full = int'($signed(a)) + int'($signed(b)); r = 16'(full);
                    ovf = full > 32767 || full < -32768; end
        5'd2: begin full = int'($signed(a)) - int'($signed(b)); r = 16'(full);
                    ovf = full > 32767 || full < -32768; end
        5'd3: r = a & b;
        5'd4: r = a | b;
        5'd5: r = a ^ b;
        5'd6: r = ~a;
        5'd7: r = a;
        default: r = (cnt >= 16) ? 16'd0 : (w[24] ? (a >> cnt) : 16'(32'(a) << cnt));
      endcase
      ACC = r;
      CF  = {r[15], ovf, r == 16'd0};
      if (w[16]) R[w[4:0]] = r;
    end else if (op == 5'd9) begin
      R[w[10:6]] = dmem_rd(w[26:11]);
    end else if (op == 5'd10) begin
      ACC = R[w[10:6]];
    end else if (op == 5'd11 && ct) begin
      if (w[7]) begin
        STK[SP] = PC; SP++; depth++;
        if (depth > max_depth) max_depth = depth;
      end
      PC = w[26:11];
    end else if (op == 5'd12) begin
      SP--; if (depth > 0) depth--;
      PC = STK[SP];
    end
  endtask

  // Data accesses of the current instruction are checked as they happen.
  instr_t cur_w;
  logic   cur_valid = 0;
  always @(negedge clk) if (cur_valid && dmemAck) begin
    check("data address is the page-0 address", dmemAddr === cur_w[26:11]);
    if (dmemWr) check("store data is register C", dmemWdata === R[cur_w[10:6]]);
    check("read only by LOAD, write only by STORE",
          (dmemRd && cur_w[31:27] == 5'd9) || (dmemWr && cur_w[31:27] == 5'd10));
  end

  initial begin
    instr_t w;
    foreach (R[i]) R[i] = '0;
    foreach (STK[i]) STK[i] = '0;
    ACC = '0; CF = '0; SP = '0; PC = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (n_instr < N_INSTR) begin
      if (ctrlState != S_READING) begin
        if (ctrlState == S_IDLE) n_stall++;
        @(negedge clk);
        continue;
      end
      // Reading: the previous instruction has completed.
      check("accumulator", AccOut === ACC);
      check("flags", cf === CF);
      for (int i = 0; i < 32; i++) check("register", dut.u_dp.u_rf.regs[i] === R[i]);
      @(negedge clk);  // Decoding
      w = word_at(PC);
      check("IR holds the word at the model's PC", instrRegOut === w);
      cTrue = (PC == '0) ? 1'b1 : 1'($urandom);
      cur_w = w; cur_valid = 1;
      n_group[dut.u_ctrl.decodeBundle.instrGroup]++;
      if (w[31:27] == 5'd11) begin if (cTrue) n_taken++; else n_untaken++; end
      // execute: let the data accesses of this instruction be checked
      // against the registers before the model updates them
      @(negedge clk);
      while (ctrlState == S_EXEC) @(negedge clk);
      model_step(w, cTrue);
      n_instr++;
    end
    for (int g = 0; g < 8; g++) check("every instruction group occurred", n_group[g] > 0);
    check("taken branch occurred", n_taken > 0);
    check("untaken branch occurred", n_untaken > 0);
    check("shift count from a register occurred", n_src_reg > 0);
    check("ACC as ALU operand occurred", n_acc_op > 0);
    check("stack overflow (more than 16 nested calls) occurred", max_depth > 16);
    check("stall in Idle occurred", n_stall > 0);
    check("instruction memory wait occurred", n_iwait > 0);
    check("data memory wait occurred", n_dwait > 0);
    $display("instructions %0d: nop %0d alu %0d alu_st %0d load %0d store %0d jump %0d call %0d ret %0d",
             n_instr, n_group[0], n_group[1], n_group[2], n_group[3], n_group[4], n_group[5],
             n_group[6], n_group[7]);
    $display("taken %0d untaken %0d, shift by register %0d, ACC operands %0d, max call depth %0d",
             n_taken, n_untaken, n_src_reg, n_acc_op, max_depth);
    $display("stall cycles %0d, imem waits %0d, dmem waits %0d", n_stall, n_iwait, n_dwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
