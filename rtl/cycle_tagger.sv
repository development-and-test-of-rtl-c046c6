// Clock-cycle numbering for the 125 MHz / 156.25 MHz pair.
//
// A PLL makes 31.25 MHz, the greatest common divisor of the two clocks; a
// flip-flop divides it by two into a toggle signal (15.625 MHz) whose edges
// sit on the common edge grid. Each clock domain samples the toggle in two
// flip-flops; the AND of the first and the inverted second marks a rising
// edge of the toggle and sets that domain's counter (mod 4 at 125 MHz, mod 5
// at 156.25 MHz). Both counters are thereby numbered from the same common
// edge: cycles_125 and cycles_156 are 0 in the cycle that starts at a common
// edge. The SET value (SET_VALUE = 2, the two-flip-flop delay) is this
// implementation's derivation; everything else follows the design.
// locked goes high once both counters were set.
module cycle_tagger #(
  parameter logic [2:0] SET_VALUE = 3'd2
) (
  input  logic       clk_31,
  input  logic       clk_125,
  input  logic       clk_156,
  input  logic       rst,
  output logic [1:0] cycles_125,
  output logic [2:0] cycles_156,
  output logic       locked
);
  logic toggle;
  logic t125_a, t125_b, set_125, lock_125;
  logic t156_a, t156_b, set_156, lock_156;

  always_ff @(posedge clk_31) begin
    if (rst) toggle <= 1'b0;
    else     toggle <= ~toggle;
  end

  assign set_125 = t125_a & ~t125_b;
  assign set_156 = t156_a & ~t156_b;

  always_ff @(posedge clk_125) begin
    if (rst) begin
      t125_a     <= 1'b0;
      t125_b     <= 1'b0;
      cycles_125 <= '0;
      lock_125   <= 1'b0;
    end else begin
      t125_a <= toggle;
      t125_b <= t125_a;
      if (set_125) begin
        cycles_125 <= SET_VALUE[1:0];
        lock_125   <= 1'b1;
      end else begin
        cycles_125 <= cycles_125 + 2'd1;
      end
    end
  end

  always_ff @(posedge clk_156) begin
    if (rst) begin
      t156_a     <= 1'b0;
      t156_b     <= 1'b0;
      cycles_156 <= '0;
      lock_156   <= 1'b0;
    end else begin
      t156_a <= toggle;
      t156_b <= t156_a;
      if (set_156) begin
        cycles_156 <= SET_VALUE;
        lock_156   <= 1'b1;
      end else begin
        cycles_156 <= (cycles_156 == 3'd4) ? 3'd0 : cycles_156 + 3'd1;
      end
    end
  end

  assign locked = lock_125 & lock_156;
endmodule
