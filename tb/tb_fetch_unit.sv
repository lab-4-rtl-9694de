// tb_fetch_unit -- self-checking test of the fetch unit handshake.
//
// A behavioural memory answers each read after 0 to 3 wait cycles with a
// word derived from the address; the address is the testbench's own PC,
// advanced on PCInc. The control side pulses ReadInstr at random while
// vldInstr is high. Checked: the word held when vldInstr is high, vldInstr
// falling the cycle after ReadInstr, memRd only while no word is held,
// PCInc exactly on accepted ReadInstr pulses, and the number of words
// fetched.
`timescale 1ns/1ps
module tb_fetch_unit;
  import micro_control_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   ReadInstr = 0, vldInstr, memRd, memAck = 0, PCInc;
  instr_t instrWord, memData = '0;
  int     checks = 0, failures = 0;
  int     pc = 0, reads = 0, acks = 0, waits = 0;

  fetch_unit dut (.clk, .rst_n, .ReadInstr, .vldInstr, .instrWord,
                  .memRd, .memAck, .memData, .PCInc);

  always #5 clk = ~clk;

  function automatic instr_t word_at(int a);
    return 32'h9E37_79B9 * a + 32'h1234;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: answer a pending read after a random number of wait cycles
  initial begin
    int lat;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      memAck = 0;
      if (memRd) begin
        lat = $urandom_range(0, 3);
        waits += lat;
        repeat (lat) @(negedge clk);
        memData = word_at(pc);
        memAck  = 1;
        acks++;
      end
    end
  end

  // control side and checks
  initial begin
    logic prev_read;
    repeat (3) @(posedge clk);
    check("memRd after reset", memRd === 1'b1);
    check("no vldInstr after reset", vldInstr === 1'b0);
    rst_n = 1;
    prev_read = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (prev_read) check("vldInstr low after ReadInstr", vldInstr === 1'b0);
      check("memRd xor vldInstr", memRd === !vldInstr);
      if (vldInstr) check("held word", instrWord === word_at(pc));
      ReadInstr = vldInstr && ($urandom_range(0, 2) == 0);
      #1 check("PCInc on accepted ReadInstr", PCInc === ReadInstr);
      @(posedge clk);
      if (ReadInstr) begin reads++; pc++; end
      prev_read = ReadInstr;
      #1 ReadInstr = 0;
    end
    check("acks match reads", acks == reads || acks == reads + 1);
    check("some reads", reads > 200);
    check("memory wait cycles seen", waits > 0);
    $display("reads=%0d acks=%0d wait_cycles=%0d", reads, acks, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
