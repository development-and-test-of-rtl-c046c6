`timescale 1ns/1ps
// Testbench of phase_corrector in a closed loop with a model of the delay
// line and fibre: measured phase = offset + tap * 2 counts (a later echo
// reads as a larger count), plus +-1 count of noise. The offset drifts like a temperature change (several hundred
// counts). The loop must bring the mean phase within DEADBAND + one tap
// step of the set point, move the tap one step per averaging block at
// most, raise tap_load with each change, and stop at tap 0 when the target
// cannot be reached.
module tb_phase_corrector;
  logic clk = 0, rst = 1, enable = 0;
  logic [15:0] setpoint = 16'd3000, phase = 0;
  logic phase_valid = 0;
  logic [10:0] tap;
  logic tap_load;
  int checks = 0, failures = 0;

  phase_corrector #(.CW(16), .TAP_MAX(1535), .AVG_LOG2(2), .DEADBAND(1)) dut (
    .clk, .rst, .enable, .setpoint, .phase, .phase_valid, .tap, .tap_load);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int offset = 1600;
  logic [10:0] last_tap;
  int loads = 0;
  always @(posedge clk) if (tap_load) loads++;

  task automatic measure();
    @(negedge clk);
    phase = 16'(offset + 2 * int'(tap) + int'($urandom % 3) - 1);
    phase_valid = 1;
    @(negedge clk);
    phase_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  function automatic int err_now();
    return offset + 2 * int'(tap) - int'(setpoint);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (tap !== 11'd767) begin failures++; $display("reset tap %0d", tap); end
    // disabled: tap must not move
    repeat (40) measure();
    checks++;
    if (tap !== 11'd767 || loads != 0) failures++;
    enable = 1;
    // converge from an error of 1600 + 1534 - 3000 = 134 counts
    repeat (4 * 200) begin
      last_tap = tap;
      measure();
      checks++;
      if (tap > last_tap + 1 || tap + 1 < last_tap) failures++;
    end
    checks++;
    if (err_now() > 3 || err_now() < -3) begin failures++; $display("not converged: error %0d", err_now()); end
    // drift: offset rises slowly by 400 counts (the loop must follow)
    for (int s = 0; s < 400; s++) begin
      offset++;
      repeat (4) measure();
    end
    repeat (4 * 40) measure();
    checks++;
    if (err_now() > 3 || err_now() < -3) begin failures++; $display("drift not followed: error %0d", err_now()); end
    $display("after drift: tap %0d error %0d loads %0d", tap, err_now(), loads);
    // unreachable set point: the tap runs to 0 and stays
    setpoint = 16'd10;
    repeat (4 * 1200) measure();
    checks++;
    if (tap !== 11'd0) begin failures++; $display("tap %0d, expected 0", tap); end
    checks++;
    if (loads < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
