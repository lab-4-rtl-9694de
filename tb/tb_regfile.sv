// tb_regfile -- self-checking test of the register file: reset to zero,
// random writes and reads on both ports against an array model, including
// reads of the register written in the same cycle (old value).
`timescale 1ns/1ps
module tb_regfile;
  logic        clk = 0, rst_n = 0, RegFileWr = 0;
  logic [4:0]  Asel = 0, Bsel = 0, Csel = 0;
  logic [15:0] busC = 0, busA, busB;
  logic [15:0] model [32];
  int          checks = 0, failures = 0, same = 0;

  regfile dut (.clk, .rst_n, .Asel, .Bsel, .Csel, .RegFileWr, .busC, .busA, .busB);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      Asel = 5'($urandom); Bsel = 5'($urandom); Csel = 5'($urandom);
      if (n % 7 == 0) Asel = Csel;
      RegFileWr = 1'($urandom); busC = 16'($urandom);
      #1;
      checks += 2;
      if (busA !== model[Asel]) begin failures++; $display("FAIL A r%0d", Asel); end
      if (busB !== model[Bsel]) begin failures++; $display("FAIL B r%0d", Bsel); end
      if (RegFileWr && Asel == Csel) same++;
      @(posedge clk);
      if (RegFileWr) model[Csel] = busC;
    end
    checks++;
    if (same == 0) begin failures++; $display("FAIL no same-cycle read/write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
