// Symbol source of the fixed-latency 8B/10B link.
//
// Between messages the link carries idle commas K28.1. Every MSG_PERIOD
// cycles it sends a message: the start comma K28.0 followed by a 32-bit
// counter as four data symbols, most significant byte first. The counter
// counts 125 MHz cycles, so a message also carries the time at which it
// started; the counter meaning and the message period are this
// implementation's choices, the symbol sequence follows the design.
// Outputs are registered; msg_start marks the K28.0 symbol.
module msg_gen
  import cd_pkg::*;
#(
  parameter int unsigned MSG_PERIOD = 20
) (
  input  logic       clk,
  input  logic       rst,
  output logic [7:0] sym,
  output logic       k,
  output logic       msg_start
);
  logic [31:0] time_cnt;
  logic [31:0] stamp;
  logic [$clog2(MSG_PERIOD)-1:0] pcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      time_cnt  <= '0;
      stamp     <= '0;
      pcnt      <= '0;
      sym       <= K28_1;
      k         <= 1'b1;
      msg_start <= 1'b0;
    end else begin
      time_cnt  <= time_cnt + 1;
      pcnt      <= (pcnt == ($bits(pcnt))'(MSG_PERIOD - 1)) ? '0 : pcnt + 1'b1;
      msg_start <= 1'b0;
      unique case (pcnt)
        0: begin
          sym <= K28_0; k <= 1'b1; msg_start <= 1'b1;
          stamp <= time_cnt;
        end
        1: begin sym <= stamp[31:24]; k <= 1'b0; end
        2: begin sym <= stamp[23:16]; k <= 1'b0; end
        3: begin sym <= stamp[15:8];  k <= 1'b0; end
        4: begin sym <= stamp[7:0];   k <= 1'b0; end
        default: begin sym <= K28_1; k <= 1'b1; end
      endcase
    end
  end
endmodule
