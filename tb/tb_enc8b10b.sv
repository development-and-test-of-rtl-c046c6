`timescale 1ns/1ps
// Testbench of enc8b10b.
// 1) A fixed sequence whose codes are taken from the published 8B/10B tables,
//    written in line order "abcdei fghj", including the running-disparity
//    flips, D.x.7 / A7 and D.x.3 cases and the K28.0/K28.1/K28.5 commas.
// 2) 3000 random symbols: every code has disparity 0 or +-2 with the sign the
//    running disparity allows, no run of more than 5 equal bits on the line,
//    and no code stands for two different symbols (decodability).
module tb_enc8b10b;
  logic clk = 0, rst = 1;
  logic [7:0] din = 0;
  logic k = 0;
  logic [9:0] dout;
  int checks = 0, failures = 0;

  enc8b10b dut (.clk, .rst, .din, .k, .dout);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] line(input string s);  // "abcdeifghj"
    for (int i = 0; i < 10; i++) line[i] = (s[i] == "1");
  endfunction

  typedef struct { logic [7:0] d; bit k; string code; } vec_t;
  vec_t vecs [] = '{
    '{8'hBC, 1, "0011111010"},  // K28.5 RD-  -> RD+
    '{8'hBC, 1, "1100000101"},  // K28.5 RD+  -> RD-
    '{8'hB5, 0, "1010101010"},  // D21.5      -> RD-
    '{8'h3C, 1, "0011111001"},  // K28.1 RD-  -> RD+
    '{8'h1C, 1, "1100001011"},  // K28.0 RD+  -> RD+
    '{8'h00, 0, "0110001011"},  // D0.0 RD+   -> RD+
    '{8'hE7, 0, "0001110001"},  // D7.7 RD+   -> RD-
    '{8'hF1, 0, "1000110111"},  // D17.7 RD- (A7) -> RD+
    '{8'hEB, 0, "1101001000"},  // D11.7 RD+ (A7) -> RD-
    '{8'h63, 0, "1100011100"},  // D3.3 RD-   -> RD-
    '{8'h00, 0, "1001110100"},  // D0.0 RD-   -> RD-
    '{8'h3C, 1, "0011111001"},  // K28.1 RD-  -> RD+
    '{8'h3C, 1, "1100000110"},  // K28.1 RD+  -> RD-
    '{8'h1C, 1, "0011110100"}   // K28.0 RD-  -> RD-
  };

  function automatic int disp_of(input logic [9:0] c);
    return 2 * $countones(c) - 10;
  endfunction

  initial begin
    int rd;            // -1 or +1, tracked by the testbench
    int run;
    logic last;
    logic [9:0] seen_code [bit [9:0]];   // key {rd, k, din}
    logic [8:0] owner [logic [9:0]];     // code -> {k, din}
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- 1) fixed vectors
    foreach (vecs[i]) begin
      din = vecs[i].d; k = vecs[i].k;
      @(negedge clk);
      checks++;
      if (dout !== line(vecs[i].code)) begin
        failures++;
        $display("vector %0d: got %b (line order reversed) exp %s", i, dout, vecs[i].code);
      end
    end
    // ---- 2) random properties, RD restarts at -1
    rst = 1; @(negedge clk); rst = 0;
    rd = -1; run = 0; last = 1'bx;
    for (int n = 0; n < 3000; n++) begin
      logic [9:0] c;
      bit kk;
      kk = ($urandom % 10) == 0;
      din = kk ? {3'($urandom), 5'd28} : 8'($urandom);
      k = kk;
      @(negedge clk);
      c = dout;
      checks++;
      if (!(disp_of(c) == 0 || (rd < 0 && disp_of(c) == 2) || (rd > 0 && disp_of(c) == -2))) begin
        failures++;
        $display("disparity error %b at rd %0d", c, rd);
      end
      if (disp_of(c) != 0) rd = -rd;
      for (int i = 0; i < 10; i++) begin
        if (c[i] == last) run++; else run = 1;
        last = c[i];
        if (run > 5) begin
          failures++;
          $display("run length > 5 at symbol %0d", n);
        end
      end
      checks++;
      if (owner.exists(c) && owner[c] !== {kk, din}) begin
        failures++;
        $display("code %b used for %h and %h", c, owner[c], {kk, din});
      end
      owner[c] = {kk, din};
    end
    checks++;
    if (owner.num() < 400) begin
      failures++;
      $display("too few distinct codes seen: %0d", owner.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
