// Self-synchronizing scrambler for the duty-cycle-modulated link, two bits
// per 125 MHz cycle.
//
// The duty-cycle link puts two user bits in every 8 ns clock period as a high
// time of 20, 40, 60 or 80 %. Long runs of equal data would therefore shift
// the mean level of the line, so the data are scrambled first to keep the
// symbols, and hence the DC level, balanced. Scrambling is multiplicative with
// the polynomial x^15 + x^14 + 1:
//     s[n] = d[n] ^ s[n-14] ^ s[n-15]
// A receiver undoes it with d[n] = s[n] ^ s[n-14] ^ s[n-15] on the received
// bits alone. It needs no frame marker, falls into step after 15 bits, and one
// line error spoils three data bits.
//
// Interface: d[0] is the earlier bit of the pair, s[0] its scrambled value;
// one register stage (s follows d by one clk cycle). The history resets to all
// ones, so an idle (all-zero) input still gives a pseudo-random, balanced
// symbol stream.
//
// The original design only asks for a scrambler to keep DC balance. The
// self-synchronizing type, the polynomial, the bit order and the reset value
// are choices of this design.
module dcm_scrambler (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] d,
  output logic [1:0] s
);
  logic [14:0] hist;   // hist[k-1] = scrambled bit sent k bits ago
  logic        s0, s1;

  always_comb begin
    s0 = d[0] ^ hist[13] ^ hist[14];
    s1 = d[1] ^ hist[12] ^ hist[13];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '1;
      s    <= '0;
    end else begin
      hist <= {hist[12:0], s0, s1};
      s    <= {s1, s0};
    end
  end
endmodule
