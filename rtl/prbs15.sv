// PRBS-15 source (x^15 + x^14 + 1) that advances W bits per enabled clock.
// bits[0] is the earliest bit of the group, so bits can feed a serializer that
// sends bit 0 first. The LFSR is seeded with all ones by the synchronous reset.
// The polynomial is the usual PRBS-15 one; the source itself is only named by
// the design (as a PRBS-15 test pattern), its structure is this design's own.
module prbs15 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] bits
);
  logic [14:0] lfsr;
  logic [14:0] lfsr_next;

  // Unroll W single-bit steps: new bit = s[14] ^ s[13], shifted in at bit 0.
  always_comb begin
    logic [14:0] s;
    s = lfsr;
    for (int i = 0; i < int'(W); i++) begin
      bits[i] = s[14] ^ s[13];
      s = {s[13:0], s[14] ^ s[13]};
    end
    lfsr_next = s;
  end

  always_ff @(posedge clk) begin
    if (rst)     lfsr <= '1;
    else if (en) lfsr <= lfsr_next;
  end
endmodule
