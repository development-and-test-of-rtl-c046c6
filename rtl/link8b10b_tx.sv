// Fixed-latency 8B/10B transmitter on a plain FPGA output.
//
// Output serializers of recent FPGAs only serialize 2, 4 or 8 bits, not 10,
// so the 10-bit code words are re-cut into bytes in the fabric: msg_gen makes
// the symbol stream (K28.1 idles, K28.0 + 32-bit counter messages), enc8b10b
// encodes it at 125 MHz, and a 10B-to-8B gear box moves it to 156.25 MHz,
// whose bytes an 8:1 serializer at 625 MHz DDR sends at 1.25 GBd.
// cycles_156 from cycle_tagger fixes the gear box transfer edge, which makes
// the latency from msg_start to the line the same after every power-up.
// ser_word is in the clk_156 domain, bit 0 first on the line.
module link8b10b_tx #(
  parameter int unsigned MSG_PERIOD = 20
) (
  input  logic       clk_125,
  input  logic       clk_156,
  input  logic       rst,
  input  logic [2:0] cycles_156,
  output logic       msg_start,
  output logic [7:0] ser_word
);
  logic [7:0] sym;
  logic       k;
  logic [9:0] code;

  msg_gen #(.MSG_PERIOD(MSG_PERIOD)) u_msg (
    .clk(clk_125), .rst, .sym, .k, .msg_start);
  enc8b10b u_enc (.clk(clk_125), .rst, .din(sym), .k, .dout(code));
  gearbox #(.IN_W(10), .OUT_W(8), .N_IN(4), .N_OUT(5)) u_gb (
    .clk_a(clk_125), .clk_b(clk_156), .rst, .din(code), .cyc_b(cycles_156), .dout(ser_word));
endmodule
