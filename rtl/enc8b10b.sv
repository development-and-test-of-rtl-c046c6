// Registered 8B/10B encoder with running disparity.
//
// din = HGFEDCBA, x = EDCBA selects the 5b/6b code, y = HGF the 3b/4b code.
// The tables are the standard ones of the 8B/10B code: the RD- column is
// held here, the RD+ code is its complement when the sub-block is
// unbalanced (plus D.x.7 in 6b and D.x.3 in 4b, which flip although
// balanced); D.x.A7 is used for x = 17,18,20 at RD- and x = 11,13,14 at RD+.
// Control symbols: only K28.y (the link uses K28.0 and K28.1); with k=1 the
// x field is ignored and the K28 codes are sent. dout[0] is bit 'a', the
// first bit on the line; dout = {j,h,g,f,i,e,d,c,b,a}.
// Timing: one register stage, dout valid the cycle after din; the running
// disparity starts at -1 after reset.
module enc8b10b (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] din,
  input  logic       k,
  output logic [9:0] dout
);
  logic rd;   // running disparity, 0 = negative, 1 = positive

  // 5b/6b RD- codes, written abcdei (a = MSB of the literal)
  function automatic logic [5:0] t6(input logic [4:0] x);
    unique case (x)
      5'd0:  t6 = 6'b100111;  5'd1:  t6 = 6'b011101;
      5'd2:  t6 = 6'b101101;  5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101;  5'd5:  t6 = 6'b101001;
      5'd6:  t6 = 6'b011001;  5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001;  5'd9:  t6 = 6'b100101;
      5'd10: t6 = 6'b010101;  5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101;  5'd13: t6 = 6'b101100;
      5'd14: t6 = 6'b011100;  5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011;  5'd17: t6 = 6'b100011;
      5'd18: t6 = 6'b010011;  5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011;  5'd21: t6 = 6'b101010;
      5'd22: t6 = 6'b011010;  5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;  5'd25: t6 = 6'b100110;
      5'd26: t6 = 6'b010110;  5'd27: t6 = 6'b110110;
      5'd28: t6 = 6'b001110;  5'd29: t6 = 6'b101110;
      5'd30: t6 = 6'b011110;  default: t6 = 6'b101011;
    endcase
  endfunction

  // 3b/4b RD- codes, written fghj; y = 8 stands for the alternate A7
  function automatic logic [3:0] t4(input logic [3:0] y);
    unique case (y)
      4'd0: t4 = 4'b1011;  4'd1: t4 = 4'b1001;
      4'd2: t4 = 4'b0101;  4'd3: t4 = 4'b1100;
      4'd4: t4 = 4'b1101;  4'd5: t4 = 4'b1010;
      4'd6: t4 = 4'b0110;  4'd7: t4 = 4'b1110;
      default: t4 = 4'b0111;
    endcase
  endfunction

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6, rd_out;
  logic [9:0] code;

  always_comb begin
    logic [5:0] base6;
    logic [3:0] base4;
    logic       unbal6, unbal4, alt7;
    x = din[4:0];
    y = din[7:5];
    base6  = k ? 6'b001111 : t6(x);
    unbal6 = ($countones(base6) != 3);
    c6     = (rd && (unbal6 || (!k && x == 5'd7))) ? ~base6 : base6;
    rd6    = unbal6 ? ~rd : rd;

    alt7   = (y == 3'd7) && (k || (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20))
                               || (rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    base4  = t4(alt7 ? 4'd8 : {1'b0, y});
    unbal4 = ($countones(base4) != 2);
    c4     = (rd6 && (unbal4 || y == 3'd3)) ? ~base4 : base4;
    // K28 keeps its comma: balanced y = 1,2,5,6 are inverted when RD is negative
    if (k && !rd6 && !unbal4 && y != 3'd3) c4 = ~base4;
    rd_out = unbal4 ? ~rd6 : rd6;

    // reverse into line order: a at bit 0
    for (int i = 0; i < 6; i++) code[i]     = c6[5-i];
    for (int i = 0; i < 4; i++) code[6 + i] = c4[3-i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd   <= 1'b0;
      dout <= '0;
    end else begin
      rd   <= rd_out;
      dout <= code;
    end
  end
endmodule
