`timescale 1ns/1ps
// Testbench of gtp_align_ctrl with a behavioural model of the receiving
// transceiver: a 16-bit word per 31.25 MHz cycle holding eight Manchester
// pairs (data XOR frame pattern); after every reset the model lands on a
// random one of the 16 bit offsets and raises reset-done a few cycles
// later. While the controller is not aligned the transmitter sends idle
// (zero) data. Checks: each alignment ends at offset 0; the trial count
// equals the number of resets the model saw; the mean over many
// alignments is near 16; received bytes after alignment equal the sent
// bytes; a later one-bit slip is detected and followed by realignment.
module tb_gtp_align_ctrl;
  import cd_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] rx_word;
  logic gtp_reset_done = 0, gtp_reset, aligned, rx_valid;
  logic [15:0] trials;
  logic [7:0] rx_byte;
  int checks = 0, failures = 0;

  gtp_align_ctrl dut (.clk, .rst, .rx_word, .gtp_reset_done, .gtp_reset, .aligned,
                      .trials, .rx_byte, .rx_valid);

  always #16 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter and transceiver model
  logic [15:0] w_prev = 0, w_cur = 0;
  int off = 0, done_wait = 0, resets_seen = 0;
  bit send_data = 0;
  int cyc = 0;
  logic [7:0] sent_at [int];   // byte sent in each cycle (data phase)

  function automatic logic [15:0] manch(logic [7:0] b);
    logic [7:0] dv = b ^ MANCH_FRAME;
    for (int i = 0; i < 8; i++) begin manch[2*i] = dv[i]; manch[2*i+1] = ~dv[i]; end
  endfunction

  always @(posedge clk) begin
    logic [7:0] b;
    b = send_data ? 8'($urandom) : 8'h00;
    cyc++;
    if (send_data) sent_at[cyc] = b;
    w_prev <= w_cur;
    w_cur  <= manch(b);
    if (gtp_reset) begin
      gtp_reset_done <= 0;
      done_wait <= 3 + $urandom % 6;
    end else if (done_wait > 0) begin
      done_wait <= done_wait - 1;
      if (done_wait == 1) gtp_reset_done <= 1;
    end
  end
  // count reset requests (rising edges)
  logic gtp_reset_q = 0;
  always @(posedge clk) begin
    gtp_reset_q <= gtp_reset;
    if (gtp_reset && !gtp_reset_q) begin resets_seen++; off = $urandom % 16; end
  end
  always_comb rx_word = 16'({w_cur, w_prev} >> off);

  initial begin
    int n_align = 300;
    longint sum_trials = 0;
    int got;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < n_align; a++) begin
      @(negedge clk);
      wait (aligned);
      checks++;
      if (off != 0) begin failures++; $display("aligned at offset %0d", off); end
      checks++;
      if (int'(trials) != resets_seen) begin failures++; $display("trials %0d, resets %0d", trials, resets_seen); end
      sum_trials += trials;
      resets_seen = 0;
      // force a new alignment with a one-bit slip, then wait until it is noticed
      if (a < n_align - 1) begin
        repeat (2) @(negedge clk);
        off = 1;
        repeat (40) @(negedge clk);
        checks++;
        if (aligned && off == 1) begin failures++; $display("slip not detected"); end
      end
    end
    $display("mean trials over %0d alignments: %0.2f", n_align, real'(sum_trials) / n_align);
    checks++;
    if (sum_trials < 12 * n_align || sum_trials > 21 * n_align) failures++;
    // data after alignment
    @(negedge clk);
    send_data = 1;
    got = 0;
    // a byte enters the model at cycle n, is in the received word at n+1
    // and leaves the controller at n+2
    repeat (500) begin
      @(posedge clk); #1;
      if (rx_valid && sent_at.exists(cyc - 2)) begin
        checks++;
        if (rx_byte !== sent_at[cyc - 2]) begin
          failures++;
          if (failures < 5) $display("byte %02h expected %02h", rx_byte, sent_at[cyc - 2]);
        end
        got++;
      end
    end
    checks++;
    if (got < 490 || !aligned) begin failures++; $display("only %0d bytes", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
