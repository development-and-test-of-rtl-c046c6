`timescale 1ps/1ps
// Testbench of dcm_link_tx (duty-cycle modulated link, 5-bit symbols at
// 125 MHz carried as 4-bit words at 156.25 MHz, 625 MBd). Random 2-bit data
// enter at 125 MHz; the serial stream is cut into 5-bit symbols at the only
// offset where every symbol has the 0,1 header and a thermometer, decoded,
// descrambled with d[n] = s[n] ^ s[n-14] ^ s[n-15] (which needs only the
// received bits), and compared with the input sequence. The latency from a data word
// captured at a common clock edge to its first serial bit must be the same
// for all words and after a second reset at another point of the grid.
module tb_dcm_link_tx;
  logic clk_a = 1, clk_b = 1, rst = 1;
  logic [1:0] d = 0;
  logic [3:0] ser_word;
  logic [2:0] cyc_b;
  int checks = 0, failures = 0;
  longint tick = 0;

  dcm_link_tx dut (.clk_125(clk_a), .clk_156(clk_b), .rst, .cycles_156(cyc_b), .d, .ser_word);

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

  int in_d [$];
  longint in_time [$];
  bit out_bits [$];
  longint out_time [$];
  bit active = 0;

  always @(negedge clk_a) if (active) d <= 2'($urandom);
  always @(posedge clk_a) if (active) begin in_d.push_back(d); in_time.push_back($time); end
  always @(posedge clk_b) if (active) begin
    #1;
    for (int i = 0; i < 4; i++) begin out_bits.push_back(ser_word[i]); out_time.push_back($time + i * 1600); end
  end

  // decode the 5-bit symbol starting at bit p; -1 if not a valid symbol
  function automatic int dec_sym(int p);
    bit [4:0] s;
    for (int i = 0; i < 5; i++) s[i] = out_bits[p + i];
    case (s)
      5'b00010: return 0;
      5'b00110: return 1;
      5'b01110: return 2;
      5'b11110: return 3;
      default:  return -1;
    endcase
  endfunction

  // descrambled data of symbol j when symbols start at bit o; needs the 8
  // symbols before it (16 bits of history); -1 if any symbol is invalid
  function automatic int descr(int o, int j);
    bit h [18];
    for (int k = 0; k < 9; k++) begin
      int v = dec_sym(o + 5 * (j - 8 + k));
      if (v < 0) return -1;
      h[2 * k] = v[0];
      h[2 * k + 1] = v[1];
    end
    return 2 * int'(h[17] ^ h[3] ^ h[2]) + int'(h[16] ^ h[2] ^ h[1]);
  endfunction

  task automatic measure(output longint lat);
    int off = -1;
    lat = -1;
    for (int o = 0; o < 200 && off < 0; o++) begin
      bit ok = 1;
      for (int j = 8; j < 108; j++) if (descr(o, j) != in_d[j]) begin ok = 0; break; end
      if (ok) off = o;
    end
    checks++;
    if (off < 0) begin failures++; $display("input data not found in the serial stream"); return; end
    for (int j = 8; off + 5 * j + 5 <= out_bits.size() && j < in_d.size(); j++) begin
      checks++;
      if (descr(off, j) != in_d[j]) begin failures++; $display("symbol %0d wrong", j); break; end
      if (in_time[j] % 32000 == 0) begin
        longint l = out_time[off + 5 * j] - in_time[j];
        if (lat < 0) lat = l;
        checks++;
        if (l != lat) begin failures++; $display("latency varies: %0d vs %0d", l, lat); end
      end
    end
  endtask

  initial begin
    longint lat1, lat2;
    repeat (3) @(posedge clk_a);
    wait (($time % 32000) == 0);
    @(negedge clk_a) rst = 0;
    wait (($time % 32000) == 0); #1;
    active = 1;
    repeat (400) @(posedge clk_a);
    active = 0;
    measure(lat1);
    in_d.delete(); in_time.delete(); out_bits.delete(); out_time.delete();
    rst = 1;
    repeat (7) @(posedge clk_a);
    rst = 0;
    wait (($time % 32000) == 16000); #1;
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
