`timescale 1ps/1ps
// Testbench of cycle_tagger. The three clocks come from one 800 ps time
// base, so all three rise together every 32 ns (the common edge). After
// lock, the counters must read 0 in every cycle that starts at a common edge
// and count mod 4 / mod 5 in between; locked must rise within 200 ns.
module tb_cycle_tagger;
  logic clk_31 = 1, clk_125 = 1, clk_156 = 1, rst = 1;   // all rise together at t = 0 mod 32 ns
  logic [1:0] cycles_125;
  logic [2:0] cycles_156;
  logic locked;
  int checks = 0, failures = 0;
  longint tick = 0;

  cycle_tagger dut (.clk_31, .clk_125, .clk_156, .rst, .cycles_125, .cycles_156, .locked);

  // 125 MHz: toggle every 5 ticks, 156.25 MHz every 4, 31.25 MHz every 20
  always begin
    #800;
    tick++;
    if (tick % 5 == 0)  clk_125 = ~clk_125;
    if (tick % 4 == 0)  clk_156 = ~clk_156;
    if (tick % 20 == 0) clk_31  = ~clk_31;
  end

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lock_time;
  initial begin
    repeat (4) @(posedge clk_31);
    rst = 0;
    lock_time = 0;
    while (!locked) begin @(posedge clk_125); lock_time++; end
    checks++;
    if (lock_time > 25) begin failures++; $display("lock took %0d cycles", lock_time); end
    repeat (2) @(posedge clk_31);
    repeat (1000) begin
      @(posedge clk_125);
      #1;
      checks++;
      if (cycles_125 !== 2'(($time / 8000) % 4)) begin
        failures++;
        if (failures < 5) $display("t=%0t cycles_125=%0d", $time, cycles_125);
      end
    end
    repeat (1000) begin
      @(posedge clk_156);
      #1;
      checks++;
      if (cycles_156 !== 3'(($time / 6400) % 5)) begin
        failures++;
        if (failures < 5) $display("t=%0t cycles_156=%0d", $time, cycles_156);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
