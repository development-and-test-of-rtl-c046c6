// DDMTD phase measurement block.
//
// Both the local 125 MHz reference and an echo clock returned over a
// fibre loop are sampled at the offset frequency F-dF; ddmtd_deglitch turns
// each beat signal into one tag per beat period. This block counts clk_off
// cycles from the latest reference tag and, on each echo tag, outputs the
// count. One count is worth T*dF/(F-dF) of real phase, e.g. 8 ns/999 = 8 ps
// for a 125 kHz beat; a later echo gives a larger count. Counter width CW is this implementation's choice; the
// counter saturates instead of wrapping if the reference tags stop.
// Timing: phase and phase_valid are registered, one cycle after echo_tag.
module ddmtd_phase_meter #(
  parameter int unsigned CW = 16
) (
  input  logic          clk_off,
  input  logic          rst,
  input  logic          ref_tag,
  input  logic          echo_tag,
  output logic [CW-1:0] phase,
  output logic          phase_valid
);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk_off) begin
    if (rst) begin
      cnt         <= '1;
      phase       <= '0;
      phase_valid <= 1'b0;
    end else begin
      phase_valid <= 1'b0;
      if (ref_tag)        cnt <= '0;
      else if (cnt != '1) cnt <= cnt + 1'b1;
      if (echo_tag) begin
        phase       <= ref_tag ? '0 : cnt + CW'(cnt != '1);
        phase_valid <= 1'b1;
      end
    end
  end
endmodule
