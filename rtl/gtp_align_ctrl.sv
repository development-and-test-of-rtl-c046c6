// Receiver-side aligner for the Manchester link into a multi-gigabit
// transceiver (GTP) in 16-bit mode.
//
// The sender puts 250 Mb/s user data, XORed bytewise with FRAME_PATTERN, in
// Manchester code at 500 MBd (1 = "10", 0 = "01"). The transceiver's 16-bit
// words at 31.25 MHz hold one byte (bit pairs 2i,2i+1; bit 0 first), but its
// recovered clock comes up with one of 16 phase offsets, i.e. the word
// boundary can sit at any bit. Instead of comma alignment the link is aligned
// by resetting the transceiver until the only good offset is hit: with the
// sender idle (user data 0) the decoded byte must be FRAME_PATTERN with valid
// Manchester pairs for CHECK_WORDS words in a row. Otherwise gtp_reset is
// pulsed for RESET_CYCLES cycles and another trial starts; trials counts the
// attempts (1 = first try good). With one good offset out of 16 a trial
// succeeds with probability 1/16. Once aligned, rx_byte = decoded ^
// FRAME_PATTERN with rx_valid per word; an invalid Manchester pair restarts
// the alignment. The reset-until-aligned method follows the design; the check
// length, the pattern value and the Manchester polarity are this
// implementation's choices.
module gtp_align_ctrl
  import cd_pkg::*;
#(
  parameter logic [7:0]  FRAME_PATTERN = MANCH_FRAME,
  parameter int unsigned CHECK_WORDS   = 16,
  parameter int unsigned RESET_CYCLES  = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] rx_word,
  input  logic        gtp_reset_done,
  output logic        gtp_reset,
  output logic        aligned,
  output logic [15:0] trials,
  output logic [7:0]  rx_byte,
  output logic        rx_valid
);
  typedef enum logic [1:0] {S_RESET, S_WAIT, S_CHECK, S_ALIGNED} state_e;
  state_e state;

  logic [7:0] dec;
  logic       pairs_ok;
  logic [$clog2(CHECK_WORDS+RESET_CYCLES+1)-1:0] cnt;

  always_comb begin
    pairs_ok = 1'b1;
    for (int i = 0; i < 8; i++) begin
      dec[i] = rx_word[2*i];
      if (rx_word[2*i] == rx_word[2*i+1]) pairs_ok = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_RESET;
      cnt      <= '0;
      trials   <= 16'd1;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      unique case (state)
        S_RESET: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(RESET_CYCLES - 1)) begin
            cnt   <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: if (gtp_reset_done) state <= S_CHECK;
        S_CHECK: begin
          if (pairs_ok && dec == FRAME_PATTERN) begin
            cnt <= cnt + 1'b1;
            if (cnt == ($bits(cnt))'(CHECK_WORDS - 1)) begin
              cnt   <= '0;
              state <= S_ALIGNED;
            end
          end else begin
            cnt    <= '0;
            trials <= trials + 1'b1;
            state  <= S_RESET;
          end
        end
        S_ALIGNED: begin
          if (!pairs_ok) begin
            trials <= 16'd1;
            state  <= S_RESET;
          end else begin
            rx_byte  <= dec ^ FRAME_PATTERN;
            rx_valid <= 1'b1;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  assign gtp_reset = (state == S_RESET);
  assign aligned   = (state == S_ALIGNED);
endmodule
