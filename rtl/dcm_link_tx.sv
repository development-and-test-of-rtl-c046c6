// 625 MBd duty-cycle-modulated transmitter: dcm_scrambler and dcm_encoder at
// 125 MHz, then a 5-to-4 gear box to 156.25 MHz, whose 4-bit words an output
// serializer sends at 625 MHz SDR. The user data are scrambled (self-
// synchronizing, x^15 + x^14 + 1) for DC balance, as the original design
// asks; the polynomial is this design's choice. cycles_156 from cycle_tagger
// fixes the transfer edge, so the latency is deterministic (two 125 MHz
// register stages, then the gear box). ser_word is in the clk_156 domain,
// bit 0 first on the line.
module dcm_link_tx (
  input  logic       clk_125,
  input  logic       clk_156,
  input  logic       rst,
  input  logic [2:0] cycles_156,
  input  logic [1:0] d,
  output logic [3:0] ser_word
);
  logic [1:0] ds;
  logic [4:0] sym;

  dcm_scrambler u_scr (.clk(clk_125), .rst, .d, .s(ds));
  dcm_encoder   u_enc (.clk(clk_125), .rst, .d(ds), .sym);
  gearbox #(.IN_W(5), .OUT_W(4), .N_IN(4), .N_OUT(5)) u_gb (
    .clk_a(clk_125), .clk_b(clk_156), .rst, .din(sym), .cyc_b(cycles_156), .dout(ser_word));
endmodule
