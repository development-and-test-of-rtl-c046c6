`timescale 1ns/1ps
// Testbench of ddmtd_phase_meter: reference tags every BEAT cycles, echo
// tags a known number of cycles later (including 0 and values near a full
// beat); the reported phase must equal that distance, one cycle after the
// echo tag. Without reference tags the count saturates.
module tb_ddmtd_phase_meter;
  localparam int BEAT = 1000;
  logic clk_off = 0, rst = 1, ref_tag = 0, echo_tag = 0;
  logic [15:0] phase;
  logic phase_valid;
  int checks = 0, failures = 0;

  ddmtd_phase_meter #(.CW(16)) dut (.clk_off, .rst, .ref_tag, .echo_tag, .phase, .phase_valid);

  always #4 clk_off = ~clk_off;

  initial begin : watchdog
    repeat (200000) @(posedge clk_off);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  always @(posedge clk_off) begin
    #1;
    if (phase_valid) begin
      checks++;
      if (exp_q.size() == 0 || phase !== 16'(exp_q[0])) begin
        failures++;
        $display("phase %0d expected %0d", phase, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    int d;
    int n_valid;
    repeat (3) @(negedge clk_off);
    rst = 0;
    for (int b = 0; b < 60; b++) begin
      d = (b < 3) ? b * (BEAT - 1) / 2 : $urandom % BEAT;
      for (int c = 0; c < BEAT; c++) begin
        @(negedge clk_off);
        ref_tag  = (c == 0);
        echo_tag = (c == d);
        if (c == d) exp_q.push_back(d);
      end
    end
    @(negedge clk_off); ref_tag = 0; echo_tag = 0;
    // no reference any more: saturates at all ones
    repeat (70000) @(negedge clk_off);
    echo_tag = 1; exp_q.push_back(16'hFFFF);
    @(negedge clk_off); echo_tag = 0;
    repeat (3) @(negedge clk_off);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d phases missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
