`timescale 1ps/1ps
// Testbench of link8b10b_tx (message generator, 8B/10B encoder and 10->8
// gearbox, 1.25 Gb/s). The serial stream is aligned on the first comma,
// cut into 10-bit symbols and decoded with the standard 5b/6b and 3b/4b
// tables kept here. Checks: every symbol is a valid code with correct
// running disparity; the symbol sequence is K28.0, four counter bytes,
// then K28.1 idles, repeating every MSG_PERIOD symbols; counter values
// rise by MSG_PERIOD per message; the latency from msg_start to the first
// bit of the K28.0 symbol is the same for all messages and after a second
// reset at another point of the common-edge grid.
module tb_link8b10b_tx;
  localparam int P = 20;
  logic clk_a = 1, clk_b = 1, rst = 1;
  logic [7:0] ser_word;
  logic msg_start;
  logic [2:0] cyc_b;
  int checks = 0, failures = 0;
  longint tick = 0;

  link8b10b_tx #(.MSG_PERIOD(P)) dut (
    .clk_125(clk_a), .clk_156(clk_b), .rst, .cycles_156(cyc_b), .msg_start, .ser_word);

  always begin
    #800;
    tick++;
    if (tick % 5 == 0) clk_a = ~clk_a;
    if (tick % 4 == 0) clk_b = ~clk_b;
  end
  always @(posedge clk_b) cyc_b <= 3'(($time / 6400) % 5);

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // standard RD- codes: 5b/6b as abcdei, 3b/4b as fghj (first bit on the left)
  localparam string T6 [32] = '{
    "100111","011101","101101","110001","110101","101001","011001","111000",
    "111001","100101","010101","110100","001101","101100","011100","010111",
    "011011","100011","010011","110010","001011","101010","011010","111010",
    "110011","100110","010110","110110","001110","101110","011110","101011"};
  localparam string T4 [8] = '{"1011","1001","0101","1100","1101","1010","0110","1110"};
  // RD+ forms of the 3b/4b codes, and the 3b/4b part of K28.y after a
  // 001111 6b code (the whole symbol is complemented after 110000)
  localparam string T4P [8] = '{"0100","1001","0101","0011","0010","1010","0110","0001"};
  localparam string K4 [8] = '{"0100","1001","0101","0011","0010","1010","0110","1000"};

  longint start_time [$];
  bit out_bits [$];
  longint out_time [$];
  bit active = 0;

  always @(posedge clk_a) if (active) begin #1; if (msg_start) start_time.push_back($time - 1); end
  always @(posedge clk_b) if (active) begin
    #1;
    for (int i = 0; i < 8; i++) begin out_bits.push_back(ser_word[i]); out_time.push_back($time + i * 800); end
  end

  function automatic string bits_str(int p, int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, out_bits[p + i] ? "1" : "0"};
    return s;
  endfunction
  function automatic string inv(string s);
    string r = s;
    foreach (r[i]) r[i] = (s[i] == "1") ? "0" : "1";
    return r;
  endfunction
  function automatic int ones(string s);
    int n = 0;
    foreach (s[i]) n += (s[i] == "1");
    return n;
  endfunction

  // decode the symbol at bit p: value 0..255, K28.y as 256+y, -1 if invalid
  function automatic int decode(int p);
    string s6 = bits_str(p, 6), s4 = bits_str(p + 6, 4);
    int x = -1, y = -1;
    if (s6 == "001111" || s6 == "110000") begin
      string k4 = (s6 == "110000") ? inv(s4) : s4;
      for (int i = 0; i < 8; i++) if (k4 == K4[i]) y = i;
      return (y < 0) ? -1 : 256 + y;
    end
    for (int i = 0; i < 32; i++) begin
      string p6 = (ones(T6[i]) != 3 || i == 7) ? inv(T6[i]) : T6[i];
      if (s6 == T6[i] || s6 == p6) x = i;
    end
    for (int i = 0; i < 8; i++) if (s4 == T4[i] || s4 == T4P[i]) y = i;
    if (s4 == "0111" || s4 == "1000") y = 7;
    if (x < 0 || y < 0) return -1;
    return y * 32 + x;
  endfunction

  task automatic measure(output longint lat);
    int c = -1, rd = -1, n = 0, m = 0, phase = -1;
    int sym;
    longint stamp, last_stamp = -1;
    lat = -1;
    for (int i = 0; i + 7 < out_bits.size() && c < 0; i++)
      if (bits_str(i, 7) == "0011111" || bits_str(i, 7) == "1100000") c = i;
    checks++;
    if (c < 0) begin failures++; $display("no comma found"); return; end
    for (int p = c; p + 10 <= out_bits.size(); p += 10) begin
      int disp;
      sym = decode(p);
      disp = 2 * ones(bits_str(p, 10)) - 10;
      checks++;
      if (sym < 0 || !(disp == 0 || disp == -2 * rd)) begin
        failures++;
        $display("bad symbol %s at %0d (rd %0d)", bits_str(p, 10), p, rd);
        return;
      end
      if (disp != 0) rd = -rd;
      if (sym == 256) begin                 // K28.0: start of message
        if (phase >= 0) begin
          checks++;
          if (phase != P) begin failures++; $display("message spacing %0d", phase); end
        end
        phase = 0; stamp = 0;
        if (m < start_time.size()) begin
          longint l = out_time[p] - start_time[m];
          if (lat < 0) lat = l;
          checks++;
          if (l != lat) begin failures++; $display("latency varies: %0d vs %0d", l, lat); end
        end
        m++;
      end else if (phase >= 1 && phase <= 4) begin
        checks++;
        if (sym > 255) begin failures++; $display("K code inside message"); end
        stamp = (stamp << 8) | sym;
        if (phase == 4) begin
          if (last_stamp >= 0) begin
            checks++;
            if (stamp != last_stamp + P) begin failures++; $display("stamp %0d after %0d", stamp, last_stamp); end
          end
          last_stamp = stamp;
          n++;
        end
      end else if (phase >= 0) begin
        checks++;
        if (sym != 257) begin failures++; $display("idle symbol %0d", sym); end
      end
      if (phase >= 0) phase++;
    end
    checks++;
    if (n < 10) begin failures++; $display("only %0d messages", n); end
    $display("messages %0d, last stamp %0d", n, last_stamp);
  endtask

  initial begin
    longint lat1, lat2;
    repeat (3) @(posedge clk_a);
    wait (($time % 32000) == 0);
    @(negedge clk_a) rst = 0;
    active = 1;
    repeat (400) @(posedge clk_a);
    active = 0;
    measure(lat1);
    start_time.delete(); out_bits.delete(); out_time.delete();
    rst = 1;
    repeat (7) @(posedge clk_a);
    @(negedge clk_a) rst = 0;
    active = 1;
    repeat (400) @(posedge clk_a);
    active = 0;
    measure(lat2);
    checks++;
    if (lat1 != lat2 || lat1 <= 0) begin failures++; $display("latency changed after reset"); end
    $display("latency run1 %0d ps, run2 %0d ps", lat1, lat2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
