`timescale 1ns/1ps
// Testbench of prbs15: compares the 8-bit-per-clock output with a bit-serial
// reference recurrence b[n] = b[n-15] ^ b[n-14] (seed all ones) over a full
// period of 32767 bits, and checks that en = 0 holds the sequence.
module tb_prbs15;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] bits;
  int checks = 0, failures = 0;
  bit ref_seq [$];

  prbs15 #(.W(8)) dut (.clk, .rst, .en, .bits);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_bit(int n);
    return ref_seq[n];
  endfunction

  initial begin
    int n;
    logic [7:0] hold;
    for (int i = 0; i < 15; i++) ref_seq.push_back(1'b1);   // seed = 15 ones
    for (int i = 15; i < 15 + 32767 + 64; i++)
      ref_seq.push_back(ref_seq[i-15] ^ ref_seq[i-14]);
    // period check of the reference itself is not the DUT's job; the DUT
    // must reproduce the sequence bit for bit
    repeat (3) @(posedge clk);
    rst = 0;
    n = 15;
    for (int c = 0; c < 4100; c++) begin
      @(negedge clk);
      en = 1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (bits[i] !== ref_bit(n + i)) begin
          failures++;
          if (failures < 5) $display("mismatch cycle %0d bit %0d", c, i);
        end
      end
      n += 8;
      if (c == 2000) begin
        // hold: en low for 5 cycles, output must not change
        hold = bits;
        en = 0;
        repeat (5) @(negedge clk);
        checks++;
        if (bits !== hold) failures++;
        en = 1;
      end
      @(posedge clk);
    end
    // after a full period the sequence restarts: bits 32767.. equal bits 0..
    checks++;
    if (ref_seq[15 + 32767] !== ref_seq[15]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
