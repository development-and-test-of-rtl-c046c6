`timescale 1ns/1ps
// Testbench of ddmtd_deglitch (4 ones after 4 zeros). Drives beat-like
// sequences: clean low/high halves (one tag per rising half; the monitor
// sees it 6 clock edges after the first high sample is applied), edges
// with isolated glitches of fewer than 4 ones between runs of at least 4
// zeros (exactly one tag, at the first run of 4 ones), dense 0101 edges
// with no run of 4 zeros before the ones (no tag: that beat is skipped),
// falling edges (no tag), short glitches (no tag) and a long high level
// (one tag only).
module tb_ddmtd_deglitch;
  logic clk_off = 0, rst = 1, din = 0;
  logic tag;
  int checks = 0, failures = 0;
  int cyc = 0;
  int tag_cycles [$];

  ddmtd_deglitch #(.N_ONES(4), .N_ZEROS(4)) dut (.clk_off, .rst, .din, .tag);

  always #4 clk_off = ~clk_off;
  always @(posedge clk_off) begin
    cyc++;
    if (tag) tag_cycles.push_back(cyc);
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk_off);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input bit v);
    @(negedge clk_off) din = v;
  endtask

  task automatic expect_tags(input int n, input string what);
    repeat (8) drive(din);
    checks++;
    if (tag_cycles.size() != n) begin
      failures++;
      $display("%s: %0d tags, expected %0d", what, tag_cycles.size(), n);
    end
    tag_cycles.delete();
  endtask

  initial begin
    int first_high;
    repeat (3) @(negedge clk_off);
    rst = 0;
    repeat (10) drive(0);
    tag_cycles.delete();
    // clean beat periods with tag timing
    for (int b = 0; b < 5; b++) begin
      repeat (50) drive(0);
      drive(1); first_high = cyc;
      repeat (49) drive(1);
      checks++;
      if (tag_cycles.size() != 1 || tag_cycles[0] - first_high != 6) begin
        failures++;
        $display("clean beat %0d: %0d tags, delay %0d", b, tag_cycles.size(),
                 tag_cycles.size() ? tag_cycles[0] - first_high : -1);
      end
      tag_cycles.delete();
    end
    // rising edges with isolated glitches, then a falling edge with glitches
    for (int b = 0; b < 20; b++) begin
      repeat (40) drive(0);
      for (int i = 0; i < 1 + b % 4; i++) begin
        repeat (1 + $urandom % 3) drive(1);
        repeat (4 + $urandom % 3) drive(0);
      end
      drive(1); first_high = cyc;
      repeat (40) drive(1);
      for (int i = 0; i < 3; i++) begin
        repeat (1 + $urandom % 3) drive(0);
        repeat (1 + $urandom % 3) drive(1);
      end
      repeat (40) drive(0);
      checks++;
      if (tag_cycles.size() != 1 || tag_cycles[0] - first_high != 6) begin
        failures++;
        $display("glitchy edge %0d: %0d tags", b, tag_cycles.size());
      end
      tag_cycles.delete();
    end
    // dense oscillation at the edge (runs of 1 to 3 of each level, so no
    // run of 4 zeros precedes the ones): the beat gives no tag at all
    for (int b = 0; b < 20; b++) begin
      repeat (40) drive(0);
      for (int i = 0; i < 12; i++) repeat (1 + $urandom % 3) drive(i % 2);
      repeat (40) drive(1);
      for (int i = 0; i < 12; i++) repeat (1 + $urandom % 3) drive(i % 2);
      repeat (40) drive(0);
      checks++;
      if (tag_cycles.size() != 0) begin
        failures++;
        $display("dense edge %0d: %0d tags", b, tag_cycles.size());
      end
      tag_cycles.delete();
    end
    // glitches shorter than 4 ones
    for (int w = 1; w < 4; w++) begin
      repeat (20) drive(0);
      repeat (w) drive(1);
      repeat (20) drive(0);
      expect_tags(0, "glitch");
    end
    // long high: only one tag
    repeat (20) drive(0);
    repeat (300) drive(1);
    expect_tags(1, "long high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
