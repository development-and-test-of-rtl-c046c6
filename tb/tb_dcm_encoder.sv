`timescale 1ns/1ps
// Testbench of dcm_encoder: for random 2-bit inputs the registered 5-bit
// symbol (bit 0 sent first) must be the header 0,1 followed by a
// thermometer, i.e. one low bit, then d+1 high bits, then low bits, giving
// a duty cycle of 20/40/60/80 %. Reset gives the symbol for d = 0.
module tb_dcm_encoder;
  logic clk = 0, rst = 1;
  logic [1:0] d = 0;
  logic [4:0] sym;
  int checks = 0, failures = 0;

  dcm_encoder dut (.clk, .rst, .d, .sym);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sym(input logic [1:0] dv);
    int ones = 0, run_end = 0;
    checks++;
    for (int i = 0; i < 5; i++) ones += sym[i];
    // high bits must be bits 1..dv+1, contiguous
    for (int i = 0; i < 5; i++)
      if (sym[i] !== ((i >= 1 && i <= int'(dv) + 1) ? 1'b1 : 1'b0)) run_end = 1;
    if (run_end || ones != int'(dv) + 1) begin
      failures++;
      $display("d=%0d sym=%b", dv, sym);
    end
  endtask

  initial begin
    logic [1:0] prev;
    repeat (2) @(negedge clk);
    check_sym(2'd0);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      prev = 2'($urandom);
      d = prev;
      @(negedge clk);
      check_sym(prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
