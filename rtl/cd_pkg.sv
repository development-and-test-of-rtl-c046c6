// Shared types and constants of the clock distributor FPGA logic.
// tx_mode_e lists the transmit modes one group of 8 SFP transmitters can run
// in; every mode is produced as an 8-bit word per 125 MHz cycle that an 8:1
// DDR output serializer sends at 1 Gb/s, bit 0 first.
package cd_pkg;

  typedef enum logic [3:0] {
    TX_OFF      = 4'd0,  // line held low
    TX_CLK125   = 4'd1,  // 125 MHz clock, 50 % duty cycle
    TX_CLK250   = 4'd2,  // 250 MHz clock
    TX_CLK500   = 4'd3,  // 500 MHz clock
    TX_PRBS_1G  = 4'd4,  // PRBS data at 1 Gb/s
    TX_PRBS_500 = 4'd5,  // PRBS data at 500 Mb/s
    TX_PRBS_250 = 4'd6,  // PRBS data at 250 Mb/s
    TX_DCM_CLK  = 4'd7,  // 125 MHz clock, duty cycle carries 125 Mb/s data
    TX_PAT01    = 4'd8,  // 500 MBd "01xy01(~x)(~y)" frames, 125 Mb/s data
    TX_MANCH    = 4'd9   // 500 MBd Manchester, 250 Mb/s data XOR framing pattern
  } tx_mode_e;

  // Clock patterns, bit 0 leaves the serializer first.
  localparam logic [7:0] PAT_CLK125 = 8'b0000_1111;
  localparam logic [7:0] PAT_CLK250 = 8'b0011_0011;
  localparam logic [7:0] PAT_CLK500 = 8'b0101_0101;
  // Duty-cycle-modulated 125 MHz clock: 3/8 high for a 0, 5/8 high for a 1.
  localparam logic [7:0] PAT_DCM0   = 8'b0000_0111;
  localparam logic [7:0] PAT_DCM1   = 8'b0001_1111;

  // 8B/10B control symbols used on the fixed-latency link (K28.y byte = 8'h1C | y<<5).
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] K28_1 = 8'h3C;

  // Framing pattern XORed with the Manchester link's user bytes.
  localparam logic [7:0] MANCH_FRAME = 8'h0F;

endpackage
