// tb_execute_unit -- self-checking test of the control state machine.
//
// The testbench plays the fetch unit (vldInstr returns 0 to 4 cycles after
// each ReadInstr pulse), the decode function (a random decode bundle per
// instruction, all eight groups) and the data memory (memAck after random
// wait cycles). A cycle-level reference of the Idle / Reading / Decoding /
// gxs1..gxsn sequence, kept here, predicts state, ReadInstr and every
// execute bundle signal each cycle; the number of cycles per instruction is
// checked against 2 + the group's state count + wait cycles. Each group,
// the stall in Idle, memory wait cycles and the direct Reading transition
// after gxsn must occur.
`timescale 1ns/1ps
module tb_execute_unit;
  import micro_control_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            vldInstr = 0, ReadInstr, memAck = 0;
  decode_bundle_t  dbun = '0, ir_bundle = '0, dq = '0;
  execute_bundle_t eb, exp_eb;
  addr_t           ctrlData;
  ctrl_state_e     state, rstate;
  logic [2:0]      step;
  int              rstep;
  logic            exp_read, ref_adv, ref_last, drop_vld = 0;
  int              checks = 0, failures = 0, vld_cnt = 0;
  int              grp_seen[8], idle_cycles = 0, mem_waits = 0, direct_reads = 0;

  execute_unit dut (.clk, .rst_n, .vldInstr, .ReadInstr, .decodeBundle(dbun),
                    .memAck, .execBundle(eb), .ctrlData, .state, .step);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic decode_bundle_t random_bundle();
    decode_bundle_t b;
    b = {$urandom, $urandom, $urandom};
    b.instrGroup = instr_group_e'($urandom_range(0, 7));
    b.ALUsel     = alu_op_e'($urandom_range(0, 9));
    return b;
  endfunction

  function automatic int n_states(instr_group_e g);
    case (g)
      G_ALU_ST: return 2;
      G_LOAD, G_CALL, G_RET: return 3;
      G_STORE: return 4;
      G_JUMP: return 2;
      default: return 1;
    endcase
  endfunction

  // Expected outputs of the reference state.
  task automatic expect_outputs();
    exp_eb = '0;
    exp_eb.Asel = dq.Asel; exp_eb.Bsel = dq.Bsel; exp_eb.Csel = dq.Csel;
    exp_eb.ALUsel = dq.ALUsel; exp_eb.DATAsel = dq.DATAsel; exp_eb.MBRsel = dq.MBRsel;
    exp_read = 0; ref_adv = 1;
    ref_last = (rstep == n_states(dq.instrGroup));
    if (rstate == S_READING) begin exp_eb.IRen = 1; exp_read = 1; end
    if (rstate == S_EXEC) begin
      unique case ({dq.instrGroup, 3'(rstep)})
        {G_ALU, 3'd1}, {G_ALU_ST, 3'd1}: begin exp_eb.ACCen = 1; exp_eb.CFen = dq.CFen; end
        {G_ALU_ST, 3'd2}: begin exp_eb.DATAsel = DS_ACC; exp_eb.RegFileWr = 1; end
        {G_LOAD, 3'd1}, {G_STORE, 3'd1}: begin exp_eb.DATAsel = DS_CTRL; exp_eb.MARen = 1; end
        {G_LOAD, 3'd2}: begin
          exp_eb.memRd = 1; exp_eb.MBRsel = 1; exp_eb.MBRen = memAck; ref_adv = memAck;
        end
        {G_LOAD, 3'd3}: begin exp_eb.DATAsel = DS_MBR; exp_eb.RegFileWr = 1; end
        {G_STORE, 3'd2}: begin exp_eb.ALUsel = ALU_PASSA; exp_eb.ACCen = 1; end
        {G_STORE, 3'd3}: begin exp_eb.DATAsel = DS_ACC; exp_eb.MBRsel = 0; exp_eb.MBRen = 1; end
        {G_STORE, 3'd4}: begin exp_eb.memWr = 1; ref_adv = memAck; end
        {G_JUMP, 3'd1}, {G_CALL, 3'd1}, {G_RET, 3'd1}: ref_adv = vldInstr;
        {G_CALL, 3'd2}: begin exp_eb.STKpush = 1; exp_eb.stkInc = 1; end
        {G_RET, 3'd2}: exp_eb.stkDec = 1;
        {G_JUMP, 3'd2}, {G_CALL, 3'd3}: begin
          exp_eb.DATAsel = DS_CTRL; exp_eb.PCen = 1; exp_read = 1;
        end
        {G_RET, 3'd3}: begin
          exp_eb.DATAsel = DS_STK; exp_eb.STKpop = 1; exp_eb.PCen = 1; exp_read = 1;
        end
        default: ;
      endcase
    end
  endtask

  initial begin
    int instr_cycles, exp_cycles, waits_this;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rstate = S_IDLE; rstep = 1;
    ir_bundle = random_bundle();
    instr_cycles = 0; exp_cycles = 0; waits_this = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      // fetch unit model: vldInstr falls the cycle after ReadInstr and rises
      // again 0 to 4 cycles later
      if (drop_vld) begin
        vldInstr = 0;
        vld_cnt  = $urandom_range(0, 4);
        drop_vld = 0;
      end else if (!vldInstr && vld_cnt > 0) vld_cnt--;
      else if (!vldInstr) vldInstr = 1;
      memAck = (eb.memRd || eb.memWr) && ($urandom_range(0, 1) == 0);
      dbun = ir_bundle;
      #1;
      expect_outputs();
      checks++;
      if (state !== rstate || eb !== exp_eb || ReadInstr !== exp_read) begin
        failures++;
        $display("FAIL t=%0t state %s/%s step %0d/%0d group %s eb %h/%h rd %b/%b", $time,
                 state.name(), rstate.name(), step, rstep, dq.instrGroup.name(),
                 eb, exp_eb, ReadInstr, exp_read);
      end
      if (rstate == S_EXEC) begin
        checks++;
        if (ctrlData !== dq.memAddr) begin failures++; $display("FAIL ctrlData"); end
      end
      if (rstate == S_IDLE) idle_cycles++;
      if (rstate == S_EXEC && !ref_adv) begin waits_this++; mem_waits++; end
      instr_cycles++;
      @(posedge clk);
      // reference next state
      case (rstate)
        S_IDLE: if (vldInstr) rstate = S_READING;
        S_READING: rstate = S_DECODING;
        S_DECODING: begin dq = dbun; rstate = S_EXEC; rstep = 1; end
        S_EXEC: if (ref_adv) begin
          if (ref_last) begin
            // cycles from Reading to gxsn
            exp_cycles = 2 + n_states(dq.instrGroup) + waits_this;
            checks++;
            if (instr_cycles != exp_cycles) begin
              failures++;
              $display("FAIL cycles %0d exp %0d group %s", instr_cycles, exp_cycles,
                       dq.instrGroup.name());
            end
            grp_seen[dq.instrGroup]++;
            if (vldInstr && !exp_read) begin rstate = S_READING; direct_reads++; end
            else rstate = S_IDLE;
            rstep = 1;
          end else rstep++;
        end
        default: ;
      endcase
      drop_vld = exp_read;
      if (exp_eb.IRen) begin
        ir_bundle = random_bundle();
        instr_cycles = 1; waits_this = 0;  // the Reading cycle
      end
    end
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (grp_seen[g] == 0) begin failures++; $display("FAIL group %0d never ran", g); end
    end
    checks += 3;
    if (idle_cycles == 0) begin failures++; $display("FAIL no stall in Idle"); end
    if (mem_waits == 0) begin failures++; $display("FAIL no wait cycles"); end
    if (direct_reads == 0) begin failures++; $display("FAIL never went gxsn -> Reading"); end
    $display("groups: nop %0d alu %0d alu_st %0d load %0d store %0d jump %0d call %0d ret %0d",
             grp_seen[0], grp_seen[1], grp_seen[2], grp_seen[3], grp_seen[4], grp_seen[5],
             grp_seen[6], grp_seen[7]);
    $display("idle cycles %0d, wait cycles %0d, gxsn->Reading %0d", idle_cycles, mem_waits,
             direct_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
