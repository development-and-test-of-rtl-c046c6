`timescale 1ps/1ps
// End-to-end testbench of clock_distributor_top at its full size (6 transmit
// groups of 8 ports, 48 receivers), with no parameter overrides.
//
// Clocks: 125 MHz reference, 156.25 MHz link clock and 31.25 MHz common
// clock with rising edges aligned every 32 ns; offset clock of period
// 8008 ps (the reference minus 1/1000), so one DDMTD beat is 1000 offset
// cycles and 1 count is 8 ps of echo delay.
//
// Environment models:
//  * fibre loopback: each receiver gets the bit stream of its group's
//    serializer, delayed by a port-specific number of samples; port 0 also
//    gains one sample every SLIP samples (a slowly drifting fibre), which
//    drives its sampling offset through several wraps;
//  * echo clocks: rx_serial of port i is the reference clock delayed by a
//    known amount; for port 0 the delay follows the output delay tap
//    (8 ps per tap), closing the regulation loop of group 0;
//  * a multi-gigabit receiver model for group 4, which sends the Manchester
//    stream: 16 symbols per 31.25 MHz word, landing on a random one of
//    16 offsets after each reset.
//  With the offset clock below the reference, an echo delayed by D reads
//  as D/8 counts, so more delay gives a larger count.
//
// Mechanisms counted (a failure for any that never happens):
//  mode switches of group 5 through all ten modes with the word checked;
//  receiver lock on every port fed by a "01"-pattern group, data frames checked on ports 1..15 at a
//  fixed lag and polarity; sampling-offset moves and wraps on port 0;
//  DDMTD phase of every echo within 3 counts of delay/8 ps; delay-tap
//  corrections until the phase meets the set point; cycle-tagger lock;
//  8B/10B time messages with commas; duty-cycle link symbols decoded,
//  descrambled and matched to the input data; transceiver reset trials and
//  alignments.
module tb_clock_distributor_top;
  import cd_pkg::*;
  localparam int NG = 6, NR = 48, SLIP = 4000;

  logic clk_125 = 1, clk_156 = 1, clk_31 = 1, clk_off = 1, rst = 1;
  tx_mode_e    tx_mode [NG];
  logic        tx_use_prbs [NG];
  logic [1:0]  tx_user_bits [NG];
  logic        tx_data_take [NG];
  logic [7:0]  tx_ser_word [NG];
  logic        reg_enable [NG];
  logic [15:0] reg_setpoint [NG];
  logic [5:0]  reg_port_sel [NG];
  logic [10:0] dly_tap [NG];
  logic        dly_tap_load [NG];
  logic [7:0]  rx_samples [NR];
  logic        rx_serial [NR];
  logic        rx_valid [NR];
  logic [1:0]  rx_bits [NR];
  logic        rx_aligned [NR];
  logic [3:0]  rx_ali_pos [NR];
  logic [15:0] echo_phase [NR];
  logic        echo_phase_valid [NR];
  logic [1:0]  cycles_125;
  logic [2:0]  cycles_156;
  logic        tagger_locked, k_msg_start;
  logic [7:0]  k_ser_word;
  logic [1:0]  dcm_d = 0;
  logic [3:0]  dcm_ser_word;
  logic [15:0] gtp_rx_word;
  logic        gtp_reset_done = 0, gtp_reset, gtp_aligned, gtp_rx_valid;
  logic [15:0] gtp_trials;
  logic [7:0]  gtp_rx_byte;

  clock_distributor_top dut (
    .clk_125, .clk_156, .clk_31, .clk_off, .rst,
    .tx_mode, .tx_use_prbs, .tx_user_bits, .tx_data_take, .tx_ser_word,
    .reg_enable, .reg_setpoint, .reg_port_sel, .dly_tap, .dly_tap_load,
    .rx_samples, .rx_serial, .rx_valid, .rx_bits, .rx_aligned, .rx_ali_pos,
    .echo_phase, .echo_phase_valid,
    .cycles_125, .cycles_156, .tagger_locked, .k_msg_start, .k_ser_word,
    .dcm_d, .dcm_ser_word,
    .gtp_clk(clk_31), .gtp_rx_word, .gtp_reset_done, .gtp_reset, .gtp_aligned,
    .gtp_trials, .gtp_rx_byte, .gtp_rx_valid);

  // ---------------------------------------------------------------- clocks
  longint tick = 0;
  always begin
    #800;
    tick++;
    if (tick % 5 == 0)  clk_125 = ~clk_125;
    if (tick % 4 == 0)  clk_156 = ~clk_156;
    if (tick % 20 == 0) clk_31  = ~clk_31;
  end
  always #4004 clk_off = ~clk_off;

  int checks = 0, failures = 0;
  initial begin : watchdog
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  always @(negedge clk_125) begin
    for (int g = 0; g < NG; g++) tx_user_bits[g] <= (g == 4) ? 2'b00 : 2'($urandom);
    dcm_d <= 2'($urandom);
  end

  // sent data frames of each group, numbered
  logic [1:0] sent [NG][$];
  always @(posedge clk_125) if (!rst)
    for (int g = 0; g < NG; g++) if (tx_data_take[g] && tx_mode[g] == TX_PAT01) sent[g].push_back(tx_user_bits[g]);

  // ---------------------------------------------------------------- fibre loopback
  bit lq [NR][$];
  longint nsamp0 = 0;
  int slips0 = 0;
  initial for (int i = 0; i < NR; i++) begin
    rx_samples[i] = 0;
    for (int k = 0; k < 8 + i % 9; k++) lq[i].push_back(0);
  end
  always @(posedge clk_125) begin
    for (int i = 0; i < NR; i++) begin
      logic [7:0] w;
      w = tx_ser_word[i / 8];
      for (int b = 0; b < 8; b++) begin
        lq[i].push_back(w[b]);
        if (i == 0) begin
          nsamp0++;
          if (nsamp0 % SLIP == 0) begin lq[i].push_back(w[b]); slips0++; end
        end
      end
      for (int b = 0; b < 8; b++) rx_samples[i][b] <= lq[i].pop_front();
    end
  end

  // ---------------------------------------------------------------- echo clocks
  int echo_delay [NR];
  localparam int BASE0 = 3000;   // port 0 delay at the middle tap
  always_comb echo_delay[0] = BASE0 + 8 * (int'(dly_tap[0]) - 767);
  initial for (int i = 1; i < NR; i++) echo_delay[i] = 300 + 75 * i;   // 0.4 .. 3.8 ns
  for (genvar i = 0; i < NR; i++) begin : g_echo
    initial rx_serial[i] = 1;
    always @(clk_125) rx_serial[i] <= #(echo_delay[i]) clk_125;
  end

  // ---------------------------------------------------------------- transceiver model (group 4)
  bit sq [$];                    // Manchester symbols, one per two serializer bits
  logic [15:0] gw_prev = 0, gw_cur = 0;
  int goff = 0, gdone_wait = 0, g_resets = 0, g_align = 0, g_trials_sum = 0;
  int g_zero_bytes = 0, g_bad_bytes = 0, g_off0 = 0;
  initial repeat (32) sq.push_back(0);
  always @(posedge clk_125) if (tx_mode[4] == TX_MANCH) begin
    for (int b = 0; b < 8; b += 2) sq.push_back(tx_ser_word[4][b]);
  end
  always @(posedge clk_31) begin
    logic [15:0] w;
    for (int b = 0; b < 16; b++) w[b] = (sq.size() > 0) ? sq.pop_front() : 1'b0;
    gw_prev <= gw_cur;
    gw_cur  <= w;
  end
  assign gtp_rx_word = 16'({gw_cur, gw_prev} >> goff);
  logic gtp_reset_q = 0;
  always @(posedge clk_31) begin
    gtp_reset_q <= gtp_reset;
    if (gtp_reset && !gtp_reset_q) begin g_resets++; goff = $urandom % 16; end
    if (gtp_reset) begin gtp_reset_done <= 0; gdone_wait <= 3 + $urandom % 6; end
    else if (gdone_wait > 0) begin
      gdone_wait <= gdone_wait - 1;
      if (gdone_wait == 1) gtp_reset_done <= 1;
    end
    if (gtp_rx_valid && !rst && !gtp_reset_q) begin
      if (gtp_rx_byte == 8'h00) g_zero_bytes++;
      else begin g_bad_bytes++; $display("%0t: transceiver byte %02h, offset %0d, aligns %0d", $time, gtp_rx_byte, goff, g_align); end
    end
  end

  // ---------------------------------------------------------------- monitors
  // receivers: frames with the sent-frame count of their group at arrival
  logic [1:0] got [NR][$];
  int got_key [NR][$];
  int ali_moves0 = 0, ali_wraps0 = 0;
  logic [3:0] last_pos0 = 0;
  bit seen_lock0 = 0;
  always @(posedge clk_125) if (!rst) begin
    for (int i = 0; i < NR; i++) if (rx_valid[i] && rx_aligned[i]) begin
      got[i].push_back(rx_bits[i]);
      got_key[i].push_back(sent[i / 8].size());
    end
    if (rx_aligned[0]) seen_lock0 = 1;
    if (seen_lock0 && rx_ali_pos[0] != last_pos0) begin
      ali_moves0++;
      if ((last_pos0 == 15 && rx_ali_pos[0] == 0) || (last_pos0 == 0 && rx_ali_pos[0] == 15)) ali_wraps0++;
    end
    last_pos0 <= rx_ali_pos[0];
  end

  int tap_loads = 0, msgs = 0, phase_meas = 0;
  always @(posedge clk_off) begin
    if (dly_tap_load[0]) tap_loads++;
    if (echo_phase_valid[0]) phase_meas++;
  end
  always @(posedge clk_125) if (k_msg_start) msgs++;

  // serial streams of the two 156.25 MHz links
  bit kb [$];
  bit db [$];
  int din_d [$];
  bit link_rec = 0;
  always @(posedge clk_156) if (link_rec) begin
    #1;
    for (int b = 0; b < 8; b++) kb.push_back(k_ser_word[b]);
    for (int b = 0; b < 4; b++) db.push_back(dcm_ser_word[b]);
  end
  always @(posedge clk_125) if (link_rec) din_d.push_back(dcm_d);

  // duty-cycle symbol starting at bit p of db, -1 if not a valid symbol
  function automatic int dcm_sym(int p);
    bit [4:0] s;
    for (int b = 0; b < 5; b++) s[b] = db[p + b];
    return (s == 5'b00010) ? 0 : (s == 5'b00110) ? 1 : (s == 5'b01110) ? 2 : (s == 5'b11110) ? 3 : -1;
  endfunction
  // data of symbol j after descrambling, d[n] = s[n] ^ s[n-14] ^ s[n-15]
  function automatic int dcm_descr(int o, int j);
    bit h [18];
    for (int k = 0; k < 9; k++) begin
      int v = dcm_sym(o + 5 * (j - 8 + k));
      if (v < 0) return -1;
      h[2 * k] = v[0];
      h[2 * k + 1] = v[1];
    end
    return 2 * int'(h[17] ^ h[3] ^ h[2]) + int'(h[16] ^ h[2] ^ h[1]);
  endfunction

  // ---------------------------------------------------------------- mode check of group 5
  int modes_ok = 0;
  function automatic bit word_ok(tx_mode_e m, logic [7:0] w);
    case (m)
      TX_OFF:      return w == 8'h00;
      TX_CLK125:   return w == PAT_CLK125;
      TX_CLK250:   return w == PAT_CLK250;
      TX_CLK500:   return w == PAT_CLK500;
      TX_PRBS_1G:  return 1'b1;
      TX_PRBS_500: return w[0] == w[1] && w[2] == w[3] && w[4] == w[5] && w[6] == w[7];
      TX_PRBS_250: return w[3:0] == {4{w[0]}} && w[7:4] == {4{w[4]}};
      TX_DCM_CLK:  return w == PAT_DCM0 || w == PAT_DCM1;
      TX_PAT01:    return w[3:0] == 4'b1100 || w[7:4] != w[3:0];
      TX_MANCH:    return w[0] == w[1] && w[2] == w[3] && w[4] == w[5] && w[6] == w[7];
      default:     return 1'b0;
    endcase
  endfunction

  task automatic mode_sweep();
    for (int m = 0; m < 10; m++) begin
      int bad = 0, toggles = 0, ones = 0;
      logic [7:0] prev;
      @(negedge clk_125) tx_mode[5] = tx_mode_e'(m);
      repeat (3) @(posedge clk_125);
      prev = tx_ser_word[5];
      repeat (64) begin
        @(posedge clk_125); #1;
        if (!word_ok(tx_mode_e'(m), tx_ser_word[5])) bad++;
        if (tx_ser_word[5] != prev) toggles++;
        for (int b = 0; b < 8; b++) ones += tx_ser_word[5][b];
        prev = tx_ser_word[5];
      end
      checks++;
      // data modes must change from word to word and be roughly balanced
      if (m >= int'(TX_PRBS_1G) && m != int'(TX_DCM_CLK) && (toggles < 8 || ones < 64 || ones > 448)) bad++;
      if (bad == 0) modes_ok++;
      else begin failures++; $display("mode %0d: %0d bad words (%0d changes, %0d ones)", m, bad, toggles, ones); end
    end
  endtask

  // ---------------------------------------------------------------- end-of-run checks
  task automatic check_rx();
    int locked = 0, ports_ok = 0, frames = 0;
    // group 4 sends the Manchester stream, which is not for these receivers
    for (int i = 0; i < NR; i++) if (rx_aligned[i] && i / 8 != 4) locked++; else if (i / 8 != 4) $display("port %0d not locked, offset %0d", i, rx_ali_pos[i]);
    checks++;
    if (locked != NR - 8) begin failures++; $display("%0d of %0d receivers locked", locked, NR - 8); end
    for (int i = 1; i < 16; i++) begin
      int g = i / 8, n = got[i].size(), found = 0;
      for (int lag = 0; lag < 24 && !found; lag++)
        for (int pol = 0; pol < 2 && !found; pol++) begin
          bit ok = 1;
          for (int j = n - 300; j < n; j++)
            if (got_key[i][j] - lag < 0 || got[i][j] != (sent[g][got_key[i][j] - lag] ^ {2{pol[0]}})) begin ok = 0; break; end
          if (ok) found = 1;
        end
      checks++;
      if (n < 300 || !found) begin failures++; $display("port %0d: data not matched (%0d frames)", i, n); end
      else begin ports_ok++; frames += 300; end
    end
    $display("receivers locked %0d/%0d, data checked on %0d ports, %0d frames", locked, NR - 8, ports_ok, frames);
    checks++;
    if (ali_moves0 == 0 || ali_wraps0 == 0) begin failures++; $display("port 0 offset did not move/wrap"); end
    $display("port 0: %0d slips, %0d offset moves, %0d wraps", slips0, ali_moves0, ali_wraps0);
  endtask

  task automatic check_phases();
    int ok = 0;
    for (int i = 1; i < NR; i++) begin
      int expv = echo_delay[i] / 8, d = int'(echo_phase[i]) - expv;
      checks++;
      if (d < -3 || d > 3) begin failures++; $display("port %0d phase %0d expected %0d", i, echo_phase[i], expv); end
      else ok++;
    end
    $display("DDMTD phases correct on %0d echo ports", ok);
  endtask

  task automatic check_links();
    int commas = 0, dsym = 0, off = -1;
    for (int i = 0; i + 7 <= kb.size(); i++) begin
      int s = 0;
      for (int b = 0; b < 7; b++) s = s * 2 + kb[i + b];
      if (s == 7'b0011111 || s == 7'b1100000) commas++;
    end
    checks++;
    if (commas < 20) begin failures++; $display("only %0d commas", commas); end
    // duty-cycle link: find the input data in the decoded symbol stream
    for (int o = 0; o < 400 && off < 0; o++) begin
      bit okk = 1;
      for (int j = 8; j < 48; j++) if (dcm_descr(o, j) != din_d[j + 20]) begin okk = 0; break; end
      if (okk) off = o;
    end
    checks++;
    if (off < 0) begin failures++; $display("duty-cycle link data not found"); end
    else dsym = 40;
    $display("8B/10B link: %0d messages, %0d commas; duty-cycle link: %0d symbols matched", msgs, commas, dsym);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    int p0;
    for (int g = 0; g < NG; g++) begin
      tx_mode[g] = (g == 4) ? TX_MANCH : TX_PAT01;
      tx_use_prbs[g] = 0;
      reg_enable[g] = (g == 0);
      reg_port_sel[g] = 6'(8 * g);
      reg_setpoint[g] = 16'd4000;
    end
    reg_setpoint[0] = 16'(BASE0 / 8 - 4);  // 4 counts (32 ps) below the start point
    repeat (4) @(posedge clk_125);
    @(negedge clk_125) rst = 0;

    // transmit mode switches of group 5
    mode_sweep();
    @(negedge clk_125) tx_mode[5] = TX_PAT01;
    checks++;
    if (modes_ok != 10) failures++;
    $display("mode switches checked: %0d of 10 modes", modes_ok);

    // links: record a stretch of both serial streams
    link_rec = 1;
    repeat (600) @(posedge clk_125);
    link_rec = 0;
    checks++;
    if (!tagger_locked) begin failures++; $display("cycle tagger not locked"); end

    // transceiver alignments: after each one, slip the model by one bit
    while (g_align < 20) begin
      @(posedge clk_31);
      if (gtp_aligned) begin
        // the byte boundary is where the model's word boundary happens to
        // fall: every alignment must end at the same offset
        if (g_align == 0) g_off0 = goff;
        checks++;
        if (goff != g_off0) begin failures++; $display("transceiver aligned at offset %0d, first at %0d", goff, g_off0); end
        g_trials_sum += gtp_trials;
        g_align++;
        repeat (20) @(posedge clk_31);
        goff = (goff + 1) % 16;
        repeat (2) @(posedge clk_31);
      end
    end

    // let the regulation loop settle (16 beats per step)
    wait (phase_meas >= 100);
    p0 = int'(echo_phase[0]);
    checks++;
    if (p0 - int'(reg_setpoint[0]) > 2 || p0 - int'(reg_setpoint[0]) < -2) begin
      failures++; $display("regulated phase %0d, set point %0d", p0, reg_setpoint[0]);
    end
    checks++;
    if (tap_loads == 0) begin failures++; $display("no tap correction"); end
    $display("regulation: %0d tap loads, tap %0d, phase %0d (set point %0d)", tap_loads, dly_tap[0], p0, reg_setpoint[0]);

    check_phases();
    check_rx();
    check_links();
    checks++;
    if (g_align < 20 || g_bad_bytes != 0 || g_zero_bytes == 0) failures++;
    $display("transceiver: %0d alignments, %0d resets, mean trials %0.1f, idle bytes %0d, bad %0d",
             g_align, g_resets, real'(g_trials_sum) / g_align, g_zero_bytes, g_bad_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
