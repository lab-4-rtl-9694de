// tb_pc_reg -- self-checking test of the program counter: reset value,
// increment on PCInc, load on PCen, load winning over increment, and wrap
// at the top of the address range.
`timescale 1ns/1ps
module tb_pc_reg;
  logic        clk = 0, rst_n = 0, PCInc = 0, PCen = 0;
  logic [15:0] din = '0, pc, model;
  int          checks = 0, failures = 0, both = 0;

  pc_reg #(.ADDR_W(16), .RESET_ADDR(16'h0040)) dut (
    .clk, .rst_n, .PCInc, .PCen, .dataIn(din), .PCout(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (pc !== 16'h0040) begin failures++; $display("FAIL reset %h", pc); end
    rst_n = 1;
    model = 16'h0040;
    for (int n = 0; n < 1000; n++) begin
      PCInc = 1'($urandom);
      PCen  = ($urandom_range(0, 3) == 0);
      din   = (n == 500) ? 16'hFFFF : 16'($urandom);
      if (PCInc && PCen) both++;
      @(posedge clk);
      if (PCen) model = din;
      else if (PCInc) model = model + 16'd1;
      #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL cycle %0d got %h exp %h", n, pc, model);
      end
    end
    checks++;
    if (both == 0) begin failures++; $display("FAIL no simultaneous load/increment"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
