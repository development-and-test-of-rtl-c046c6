`timescale 1ns/1ps
// Testbench of msg_gen: K28.1 idles, and every MSG_PERIOD cycles K28.0
// followed by 4 data symbols holding the 125 MHz cycle count of the K28.0
// cycle, most significant byte first. The cycle count is kept here.
module tb_msg_gen;
  localparam int P = 12;
  logic clk = 0, rst = 1;
  logic [7:0] sym;
  logic k, msg_start;
  int checks = 0, failures = 0;

  msg_gen #(.MSG_PERIOD(P)) dut (.clk, .rst, .sym, .k, .msg_start);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;          // cycles since reset release
    int last_start = -1;
    logic [31:0] stamp;
    int pos = -1;
    int n_msgs = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (P * 30) begin
      @(posedge clk); #1;
      // symbol of cycle t (registered: produced at edge t)
      if (k && sym == 8'h1C) begin
        checks++;
        if (!msg_start) failures++;
        if (last_start >= 0) begin
          checks++;
          if (t - last_start != P) begin failures++; $display("period %0d", t - last_start); end
        end
        last_start = t; stamp = 32'(t); pos = 0; n_msgs++;
      end else if (pos >= 0 && pos < 4) begin
        checks++;
        if (k || sym !== stamp[8 * (3 - pos) +: 8]) begin
          failures++;
          $display("message byte %0d: %h k=%0b exp %h", pos, sym, k, stamp[8 * (3 - pos) +: 8]);
        end
        pos++;
      end else begin
        checks++;
        if (!(k && sym == 8'h3C)) begin failures++; $display("idle expected, got %h", sym); end
      end
      t++;
    end
    checks++;
    if (n_msgs < 25) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
