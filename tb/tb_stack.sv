// tb_stack -- self-checking test of the return-address stack: random
// pushes (STKpush with stkInc) and pops (stkDec, then STKpop) against a
// model with the same modulo-DEPTH pointer, including overflow wrap.
`timescale 1ns/1ps
module tb_stack;
  logic        clk = 0, rst_n = 0, STKpush = 0, stkInc = 0, stkDec = 0, STKpop = 0;
  logic [15:0] PCin = 0, StkOut;
  logic [15:0] model [16];
  logic [3:0]  sp;
  int          checks = 0, failures = 0, pushes = 0, pops = 0, depth = 0, max_depth = 0;

  stack #(.DEPTH(16), .DATA_W(16)) dut (
    .clk, .rst_n, .STKpush, .stkInc, .stkDec, .STKpop, .PCin, .StkOut);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    sp = 0;
    for (int n = 0; n < 2000; n++) begin
      // bias towards pushes in the first half to overflow the stack
      if ($urandom_range(0, 99) < ((n < 1000) ? 65 : 40)) begin
        @(negedge clk);
        STKpush = 1; stkInc = 1; PCin = 16'($urandom);
        @(posedge clk);
        model[sp] = PCin; sp++; pushes++; depth++;
        if (depth > max_depth) max_depth = depth;
        @(negedge clk);
        STKpush = 0; stkInc = 0;
      end else begin
        @(negedge clk);
        stkDec = 1;
        @(posedge clk);
        sp--;
        @(negedge clk);
        stkDec = 0; STKpop = 1;
        #1;
        checks++;
        if (StkOut !== model[sp]) begin
          failures++;
          $display("FAIL pop got %h exp %h", StkOut, model[sp]);
        end
        pops++; if (depth > 0) depth--;
        @(posedge clk);
        #1 STKpop = 0;
      end
    end
    checks++;
    if (max_depth <= 16) begin failures++; $display("FAIL stack never overflowed"); end
    $display("pushes %0d pops %0d max depth %0d", pushes, pops, max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
