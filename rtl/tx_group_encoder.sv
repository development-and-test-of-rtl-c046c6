// Transmit word generator of one group of 8 SFP transmitters.
//
// Each 125 MHz cycle it produces the 8-bit word that the group's 8:1 DDR
// output serializer sends at 1 Gb/s (bit 0 first); a 1:8 fanout chip copies
// the line to the 8 SFPs of the group. What is sent depends only on the word,
// so one serializer can carry clocks, data and mixed clock/data streams:
//   TX_CLK125/250/500  clock at 125, 250 or 500 MHz
//   TX_PRBS_1G/500/250 PRBS-15 data at 1 Gb/s and its sub-multiple rates
//   TX_DCM_CLK         125 MHz clock, high for 3/8 (data 0) or 5/8 (data 1)
//                      of the period: 125 Mb/s carried by the falling edge
//   TX_PAT01           500 MBd frames "0 1 x y 0 1 ~x ~y" (16 ns, 2 data
//                      bits): a fixed 125 MHz "01" edge for phase monitoring
//                      plus data sent with its complement
//   TX_MANCH           500 MBd Manchester code of 250 Mb/s data XORed with
//                      an 8-bit framing pattern (one byte every 4 cycles),
//                      for reception by a multi-gigabit transceiver
// The modes and rates are the design's; the clock duty cycles of TX_DCM_CLK,
// the Manchester polarity (1 = "10") and the framing pattern value are this
// implementation's choices.
//
// Data come from user_bits or, with use_prbs, from internal PRBS-15 sources.
// data_take is high in the cycle user_bits are consumed (user_bits[0] is the
// earlier bit). ser_word is registered: one cycle of latency.
module tx_group_encoder
  import cd_pkg::*;
#(
  parameter logic [7:0] FRAME_PATTERN = MANCH_FRAME
) (
  input  logic       clk,
  input  logic       rst,
  input  tx_mode_e   mode,
  input  logic       use_prbs,
  input  logic [1:0] user_bits,
  output logic       data_take,
  output logic [7:0] ser_word
);
  logic [7:0] prbs8;
  logic [3:0] prbs4;
  logic [1:0] prbs2;
  logic [0:0] prbs1;
  logic       en8, en4, en2, en1;

  prbs15 #(.W(8)) u_prbs8 (.clk, .rst, .en(en8), .bits(prbs8));
  prbs15 #(.W(4)) u_prbs4 (.clk, .rst, .en(en4), .bits(prbs4));
  prbs15 #(.W(2)) u_prbs2 (.clk, .rst, .en(en2), .bits(prbs2));
  prbs15 #(.W(1)) u_prbs1 (.clk, .rst, .en(en1), .bits(prbs1));

  logic       half;       // TX_PAT01: 0 = first 8 ns of the frame
  logic [1:0] held;       // TX_PAT01: x,y of the current frame
  logic [1:0] word_idx;   // TX_MANCH: which bit pair of the framing byte
  logic [1:0] d2;         // 2 data bits for PAT01 / MANCH
  logic       d1;         // 1 data bit for DCM
  logic [7:0] word_d;
  logic [1:0] mf;         // TX_MANCH: data XOR framing bits

  assign d2 = use_prbs ? prbs2 : user_bits;
  assign d1 = use_prbs ? prbs1[0] : user_bits[0];
  assign mf = d2 ^ FRAME_PATTERN[2*word_idx +: 2];

  always_comb begin
    en8 = 1'b0; en4 = 1'b0; en2 = 1'b0; en1 = 1'b0;
    data_take = 1'b0;
    word_d = '0;
    unique case (mode)
      TX_OFF:      word_d = '0;
      TX_CLK125:   word_d = PAT_CLK125;
      TX_CLK250:   word_d = PAT_CLK250;
      TX_CLK500:   word_d = PAT_CLK500;
      TX_PRBS_1G: begin
        en8 = 1'b1;
        word_d = prbs8;
      end
      TX_PRBS_500: begin
        en4 = 1'b1;
        for (int i = 0; i < 4; i++) word_d[2*i +: 2] = {2{prbs4[i]}};
      end
      TX_PRBS_250: begin
        en2 = 1'b1;
        for (int i = 0; i < 2; i++) word_d[4*i +: 4] = {4{prbs2[i]}};
      end
      TX_DCM_CLK: begin
        en1 = use_prbs;
        data_take = 1'b1;
        word_d = d1 ? PAT_DCM1 : PAT_DCM0;
      end
      TX_PAT01: begin
        // each 500 MBd symbol is two serializer bits
        if (!half) begin
          en2 = use_prbs;
          data_take = 1'b1;
          word_d = {{2{d2[1]}}, {2{d2[0]}}, 2'b11, 2'b00};
        end else begin
          word_d = {{2{~held[1]}}, {2{~held[0]}}, 2'b11, 2'b00};
        end
      end
      TX_MANCH: begin
        en2 = use_prbs;
        data_take = 1'b1;
        // Manchester 1 = "10", 0 = "01"; each symbol doubled to 500 MBd
        word_d = {{2{~mf[1]}}, {2{mf[1]}}, {2{~mf[0]}}, {2{mf[0]}}};
      end
      default:     word_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ser_word <= '0;
      half     <= 1'b0;
      held     <= '0;
      word_idx <= '0;
    end else begin
      ser_word <= word_d;
      half     <= (mode == TX_PAT01) ? ~half : 1'b0;
      word_idx <= (mode == TX_MANCH) ? word_idx + 2'd1 : 2'd0;
      if (mode == TX_PAT01 && !half) held <= d2;
    end
  end
endmodule
