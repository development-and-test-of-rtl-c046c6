`timescale 1ns/1ps
// Testbench of dcm_scrambler. A bit-serial reference keeps the scrambled
// bits sent so far in a queue and computes s[n] = d[n] ^ s[n-14] ^ s[n-15]
// one bit at a time (d[0] of each pair first); every output pair must match
// it one clock after its input. A bit-serial descrambler with no knowledge
// of the starting state, started in the middle of the stream, must return
// the input data after 15 bits. With idle (all-zero) input after reset, the
// stream must stay balanced: ones between 45 % and 55 % and no run of equal
// bits longer than 15.
module tb_dcm_scrambler;
  logic clk = 1, rst = 1;
  logic [1:0] d = 0, s;
  int checks = 0, failures = 0;

  dcm_scrambler dut (.clk, .rst, .d, .s);

  always #4 clk = ~clk;

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit sent [$];          // reference scrambled bits
  bit exp_q [$];         // expected output bits in order
  bit din_q [$];         // input data bits in order
  bit rx [$];            // bits received from the DUT
  bit idle_phase = 1;
  int ones = 0, run = 0, max_run = 0, idle_bits = 0;
  bit last = 0;

  function automatic bit ref_bit(bit dbit);
    int n = sent.size();
    bit a = (n >= 14) ? sent[n - 14] : 1'b1;
    bit b = (n >= 15) ? sent[n - 15] : 1'b1;
    bit r = dbit ^ a ^ b;
    sent.push_back(r);
    return r;
  endfunction

  // reference and expected output, computed for the data seen at each edge
  always @(posedge clk) if (!rst) begin
    bit r0, r1;
    r0 = ref_bit(d[0]);
    r1 = ref_bit(d[1]);
    exp_q.push_back(r0); exp_q.push_back(r1);
    din_q.push_back(d[0]); din_q.push_back(d[1]);
  end

  // output follows by one cycle
  bit started = 0;
  always @(posedge clk) begin
    if (started) begin
      for (int i = 0; i < 2; i++) begin
        bit e;
        e = exp_q.pop_front();
        rx.push_back(s[i]);
        checks++;
        if (s[i] != e) begin
          failures++;
          if (failures < 5) $display("bit mismatch at %0t: got %0b want %0b", $time, s[i], e);
        end
        if (idle_phase) begin
          idle_bits++;
          ones += s[i];
          run = (s[i] == last) ? run + 1 : 1;
          last = s[i];
          if (run > max_run) max_run = run;
        end
      end
    end
    started <= !rst;
  end

  always @(negedge clk) if (!rst && !idle_phase) d <= 2'($urandom);

  initial begin
    int start, errs;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2000) @(posedge clk);
    idle_phase = 0;
    repeat (2000) @(posedge clk);
    @(negedge clk);
    // balance of the idle stream
    checks++;
    if (ones * 100 < idle_bits * 45 || ones * 100 > idle_bits * 55) begin
      failures++; $display("idle stream unbalanced: %0d ones in %0d bits", ones, idle_bits);
    end
    checks++;
    if (max_run > 15) begin failures++; $display("idle run of %0d equal bits", max_run); end
    // self-synchronising descrambler, started 1001 bits into the data phase
    start = 4000 + 1001;
    errs = 0;
    for (int n = start + 15; n < rx.size(); n++) begin
      bit dd;
      dd = rx[n] ^ rx[n - 14] ^ rx[n - 15];
      checks++;
      if (dd != din_q[n]) begin errs++; failures++; end
    end
    if (errs != 0) $display("descrambler: %0d wrong bits", errs);
    $display("idle: %0d ones in %0d bits, longest run %0d", ones, idle_bits, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
