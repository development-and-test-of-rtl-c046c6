// Duty-cycle-modulation encoder: 250 Mb/s of data on a 125 MHz clock.
//
// Every 8 ns two user bits D1 D0 become a 5-bit symbol at 625 MBd: the fixed
// header "01" (0 sent first) followed by a 3-bit thermometer code, so the
// line stays a 125 MHz clock that always rises at the same place and whose
// high time is 1, 2, 3 or 4 bit times: duty cycles 20/40/60/80 % for data
// 00/01/10/11. A receiver can take the clock with an ordinary PLL (no clock
// recovery needed). sym[0] is sent first; one register stage. sym[1:0]
// (the header) are constant by construction.
// The symbol set follows the design; no scrambler is included (DC balance
// depends on the data).
module dcm_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] d,
  output logic [4:0] sym
);
  logic [2:0] therm;

  always_comb begin
    unique case (d)
      2'b00: therm = 3'b000;
      2'b01: therm = 3'b001;
      2'b10: therm = 3'b011;
      default: therm = 3'b111;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) sym <= 5'b00010;        // header with data 00
    else     sym <= {therm, 2'b10};  // bit0 = 0, bit1 = 1
  end
endmodule
