// tb_enable_reg -- self-checking test of the enable register used for CF,
// ACC, MAR and MBR: reset, load on en, hold otherwise, at widths 3 and 16.
`timescale 1ns/1ps
module tb_enable_reg;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [15:0] d = 0, q16, m16;
  logic [2:0]  q3, m3;
  int          checks = 0, failures = 0;

  enable_reg #(.W(16)) dut16 (.clk, .rst_n, .en, .d, .q(q16));
  enable_reg #(.W(3))  dut3  (.clk, .rst_n, .en, .d(d[2:0]), .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q16 !== '0 || q3 !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    m16 = '0; m3 = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = 1'($urandom); d = 16'($urandom);
      @(posedge clk);
      if (en) begin m16 = d; m3 = d[2:0]; end
      #1 checks++;
      if (q16 !== m16 || q3 !== m3) begin failures++; $display("FAIL cycle %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
