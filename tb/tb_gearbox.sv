`timescale 1ps/1ps
// Testbench of gearbox (10 -> 8 bits, 125 -> 156.25 MHz). Random 10-bit
// words enter at 125 MHz; the 8-bit output words are joined into a bit
// stream and must reproduce the input bit stream exactly (oldest word first,
// bit 0 first). The latency from a word at a common edge to its first bit
// leaving is measured and must be the same after a second reset taken at a
// different point of the common-edge grid (deterministic latency).
// The clock-cycle number is computed here from the known clock relation.
module tb_gearbox;
  logic clk_a = 1, clk_b = 1, rst = 1;   // rising edges meet at t = 0 mod 32 ns
  logic [9:0] din = 0;
  logic [7:0] dout;
  logic [2:0] cyc_b;
  int checks = 0, failures = 0;
  longint tick = 0;

  gearbox #(.IN_W(10), .OUT_W(8), .N_IN(4), .N_OUT(5)) dut (
    .clk_a, .clk_b, .rst, .din, .cyc_b, .dout);

  always begin
    #800;
    tick++;
    if (tick % 5 == 0) clk_a = ~clk_a;
    if (tick % 4 == 0) clk_b = ~clk_b;
  end
  // cycle number of the clk_b cycle in progress: 0 just after a common edge
  always @(posedge clk_b) cyc_b <= 3'(($time / 6400) % 5);

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit in_bits [$];
  longint in_time [$];    // time each input bit was presented (word time)
  bit out_bits [$];
  longint out_time [$];
  bit active = 0;

  always @(negedge clk_a) if (active) begin
    din <= 10'($urandom);
  end
  always @(posedge clk_a) if (active) begin
    for (int i = 0; i < 10; i++) begin in_bits.push_back(din[i]); in_time.push_back($time); end
  end
  always @(posedge clk_b) if (active) begin
    #1;
    for (int i = 0; i < 8; i++) begin out_bits.push_back(dout[i]); out_time.push_back($time); end
  end

  // find the input stream in the output stream; return the latency of the
  // first bit of words captured at a common edge (all must be equal)
  task automatic measure(output longint lat);
    int off = -1;
    lat = -1;
    for (int o = 0; o < 200 && off < 0; o++) begin
      bit ok = 1;
      for (int j = 0; j < 400; j++) if (out_bits[o + j] !== in_bits[j]) begin ok = 0; break; end
      if (ok) off = o;
    end
    checks++;
    if (off < 0) begin
      failures++;
      $display("input stream not found in output (%0d in, %0d out)", in_bits.size(), out_bits.size());
      for (int j = 0; j < 40; j++) $write("%0d", in_bits[j]); $display("");
      for (int j = 0; j < 80; j++) $write("%0d", out_bits[j]); $display("");
      return;
    end
    for (int j = 0; j + off < out_bits.size() && j < in_bits.size(); j++) begin
      checks++;
      if (out_bits[off + j] !== in_bits[j]) begin failures++; break; end
      if (j % 10 == 0 && in_time[j] % 32000 == 0) begin
        longint l = out_time[off + j] - in_time[j];
        if (lat < 0) lat = l;
        checks++;
        if (l != lat) begin failures++; $display("latency varies: %0d vs %0d", l, lat); end
      end
    end
  endtask

  initial begin
    longint lat1, lat2;
    // first run: start at a common edge
    repeat (3) @(posedge clk_a);
    wait ((($time) % 32000) == 0);
    @(negedge clk_a) rst = 0;
    wait ((($time) % 32000) == 0); #1;
    active = 1;
    repeat (400) @(posedge clk_a);
    active = 0;
    measure(lat1);
    // second run after reset, 3 clk_a cycles later in the grid
    in_bits.delete(); in_time.delete(); out_bits.delete(); out_time.delete();
    rst = 1;
    repeat (7) @(posedge clk_a);
    rst = 0;
    wait ((($time) % 32000) == 24000); #1;
    active = 1;
    repeat (400) @(posedge clk_a);
    active = 0;
    measure(lat2);
    checks++;
    if (lat1 != lat2) begin failures++; $display("latency changed after reset"); end
    $display("latency run1 %0d ps, run2 %0d ps", lat1, lat2);
    checks++;
    if (lat1 <= 0 || lat1 > 80000) begin failures++; $display("latency out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
