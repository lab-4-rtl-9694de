// tb_instr_reg -- self-checking test of the instruction register: reset
// value, load on IRen, hold without IRen, against a model kept here.
`timescale 1ns/1ps
module tb_instr_reg;
  import micro_control_pkg::*;

  logic   clk = 0, rst_n = 0, IRen = 0;
  instr_t din = '0, dout, model;
  int     checks = 0, failures = 0;

  instr_reg dut (.clk, .rst_n, .IRen, .instrIn(din), .instrOut(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (dout !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      IRen = 1'($urandom);
      din  = $urandom;
      @(posedge clk);
      if (IRen) model = din;
      #1;
      checks++;
      if (dout !== model) begin
        failures++;
        $display("FAIL cycle %0d got %h exp %h", n, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
