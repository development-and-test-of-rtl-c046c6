`timescale 1ns/1ps
// Testbench of dual_function_rx.
// A sender model makes 16 ns frames "0 1 x y 0 1 ~x ~y" of random data and
// turns each 500 MBd symbol into two samples; the first sample of a symbol
// is uncertain (random old/new value at a transition), like samples taken
// near an edge, the second is clean. Eight samples per cycle feed the DUT.
// Phase 1: fixed phase. Phase 2: one sample repeated every SLIP samples (the
// sender appears slower). Phase 3: one sample dropped every SLIP samples.
// Checks: lock within 300 frames; after lock every decoded frame equals the
// sent one at a fixed frame lag and polarity, the lag changing by one frame
// only around an offset wrap (frames within 14 frames after a slip may be
// wrong while the offset moves; they are counted and reported); the center window sits on clean samples
// (score 6) in at least 95 % of the locked frames of phase 1; the offset
// moves up in phase 2 and down in phase 3 and wraps at least once in each.
module tb_dual_function_rx;
  localparam int SLIP = 1000;
  logic clk = 0, rst = 1;
  logic [7:0] samples = 0;
  logic rx_valid, rx_aligned, ali_change;
  logic [1:0] rx_bits;
  logic [3:0] ali_pos;
  logic [2:0] sco_l, sco_c, sco_r, sco_avg_l, sco_avg_c, sco_avg_r;
  int checks = 0, failures = 0;

  dual_function_rx dut (.clk, .rst, .samples, .rx_valid, .rx_bits, .rx_aligned,
    .ali_pos, .ali_change, .sco_l, .sco_c, .sco_r, .sco_avg_l, .sco_avg_c, .sco_avg_r);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sender model
  int phase = 1;               // 1 fixed, 2 repeat samples, 3 drop samples
  logic [1:0] sent [$];        // data of each frame, by frame number
  bit q [$];                   // pending samples
  bit prev_sym = 0;
  int since_slip = 0;
  int slip_frame = -100;       // frame number at the latest slip

  task automatic push_sample(bit s);
    since_slip++;
    if (phase != 1 && since_slip >= SLIP) begin
      since_slip = 0;
      slip_frame = sent.size();
      if (phase == 2) begin q.push_back(s); q.push_back(s); end
      // phase 3: drop this sample
      return;
    end
    q.push_back(s);
  endtask

  task automatic make_frame();
    logic [1:0] d;
    bit sym [8];
    d = 2'($urandom);
    sent.push_back(d);
    sym = '{0, 1, d[0], d[1], 0, 1, !d[0], !d[1]};
    for (int k = 0; k < 8; k++) begin
      bit a;
      a = (sym[k] != prev_sym && ($urandom % 2)) ? prev_sym : sym[k];
      push_sample(a);
      push_sample(sym[k]);
      prev_sym = sym[k];
    end
  endtask

  always @(negedge clk) begin
    while (q.size() < 8) make_frame();
    for (int i = 0; i < 8; i++) samples[i] <= q.pop_front();
  end

  // ---------------- receiver monitor
  logic [1:0] got [$];
  int lock_frame = -1;
  int lag = 0;  bit pol = 0;  bit have_lag = 0;
  int last_wrap = -100;
  int wraps_up [4], wraps_dn [4], moves_up [4], moves_dn [4];
  int clean6 = 0, locked_frames = 0, lag_moves = 0, slip_errors = 0;
  logic [3:0] prev_pos = 0;

  always @(posedge clk) if (!rst) begin
    #1;
    if (ali_change) begin
      if (ali_pos == prev_pos + 4'd1) moves_up[phase]++; else moves_dn[phase]++;
      if (prev_pos == 4'd15 && ali_pos == 4'd0) begin wraps_up[phase]++; last_wrap = got.size(); end
      if (prev_pos == 4'd0 && ali_pos == 4'd15) begin wraps_dn[phase]++; last_wrap = got.size(); end
    end
    prev_pos = ali_pos;
    if (rx_valid) begin
      got.push_back(rx_bits);
      if (rx_aligned && lock_frame < 0) lock_frame = got.size();
      if (lock_frame >= 0 && got.size() == lock_frame + 20) find_lag();
      if (have_lag) check_frame(got.size() - 1);
      if (rx_aligned && phase == 1) begin
        locked_frames++;
        if (sco_c == 3'd6) clean6++;
      end
    end
  end

  function automatic bit match(int j, int l, bit p);
    if (j - l < 0 || j - l >= sent.size()) return 0;
    return got[j] == (sent[j - l] ^ {p, p});
  endfunction

  task automatic find_lag();
    for (int l = 0; l < 40 && !have_lag; l++)
      for (int p = 0; p < 2 && !have_lag; p++) begin
        bit ok = 1;
        for (int j = got.size() - 16; j < got.size(); j++) if (!match(j, l, p)) ok = 0;
        if (ok) begin lag = l; pol = p; have_lag = 1; end
      end
    checks++;
    if (!have_lag) begin failures++; $display("no frame lag found after lock"); end
    else $display("locked at frame %0d, lag %0d frames, polarity %0d", lock_frame, lag, pol);
  endtask

  task automatic check_frame(int j);
    checks++;
    if (match(j, lag, pol)) return;
    // a wrap of the offset skips or repeats one frame: the lag may move by one
    if (got.size() - last_wrap < 12) begin
      for (int dl = -1; dl <= 1; dl += 2) begin
        bit ok = 1;
        for (int i = j - 5; i <= j; i++) if (!match(i, lag + dl, pol)) ok = 0;
        if (ok) begin lag += dl; lag_moves++; return; end
      end
    end
    // right after a slip the center window may sit on edge samples for a
    // few frames until the offset has moved
    if (j - lag - slip_frame >= -1 && j - lag - slip_frame <= 14) begin
      slip_errors++;
      return;
    end
    failures++;
    if (failures < 10) $display("frame %0d: got %b exp %b (lag %0d)", j, got[j], sent[j - lag] ^ {pol, pol}, lag);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (1200) @(negedge clk);
    checks++;
    if (lock_frame < 0 || lock_frame > 300) begin failures++; $display("lock at frame %0d", lock_frame); end
    checks++;
    if (clean6 * 100 < locked_frames * 95) begin
      failures++; $display("center on clean samples in %0d of %0d frames", clean6, locked_frames);
    end
    phase = 2;
    repeat (6000) @(negedge clk);
    phase = 3;
    repeat (6000) @(negedge clk);
    $display("phase 2: %0d up %0d down moves, %0d up wraps; phase 3: %0d up %0d down moves, %0d down wraps; lag moves %0d, frames in error next to a slip %0d",
             moves_up[2], moves_dn[2], wraps_up[2], moves_up[3], moves_dn[3], wraps_dn[3], lag_moves, slip_errors);
    checks++; if (wraps_up[2] < 1 || moves_up[2] <= moves_dn[2]) failures++;
    checks++; if (wraps_dn[3] < 1 || moves_dn[3] <= moves_up[3]) failures++;
    checks++; if (lag_moves > 2 * (wraps_up[2] + wraps_dn[3]) + 2) failures++;
    checks++; if (slip_errors > 6 * (moves_up[2] + moves_dn[3])) failures++;
    checks++; if (!rx_aligned) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
