// Phase regulation loop for a TX group's programmable output delay.
//
// The output serializer of a group is followed by a calibrated tap delay
// line (512 taps, up to 3 cascaded: 0..1535 taps). The echo phase measured by
// the DDMTD logic drifts with temperature (about 1.2 ns over 30 degrees C);
// this loop holds it at a set point by moving the delay: it averages
// 2^AVG_LOG2 phase measurements, compares the mean with setpoint and, when
// the error exceeds DEADBAND counts, steps the tap by one against the error.
// Because the offset clock runs just below the reference frequency, a later
// echo gives a larger phase count: a phase above the set point asks for one
// tap of delay less, a phase below it for one more. The loop itself is described as
// software on an embedded processor; this logic version, its averaging, dead
// band and step size are this implementation's choices.
// Timing: tap and a one-cycle tap_load pulse are updated one cycle after the
// last measurement of an averaging block.
module phase_corrector #(
  parameter int unsigned CW       = 16,
  parameter int unsigned TAP_MAX  = 1535,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned DEADBAND = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic [CW-1:0] setpoint,
  input  logic [CW-1:0] phase,
  input  logic          phase_valid,
  output logic [10:0]   tap,
  output logic          tap_load
);
  logic [CW+AVG_LOG2-1:0] sum;
  logic [AVG_LOG2:0]      n;
  logic [CW+AVG_LOG2-1:0] sum_next;
  logic signed [CW+1:0]   err;

  always_comb begin
    sum_next = sum + (CW+AVG_LOG2)'(phase);
    err = $signed({2'b00, CW'(sum_next >> AVG_LOG2)}) - $signed({2'b00, setpoint});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum      <= '0;
      n        <= '0;
      tap      <= 11'(TAP_MAX / 2);
      tap_load <= 1'b0;
    end else begin
      tap_load <= 1'b0;
      if (!enable) begin
        sum <= '0;
        n   <= '0;
      end else if (phase_valid) begin
        if (n == (AVG_LOG2+1)'((1 << AVG_LOG2) - 1)) begin
          sum <= '0;
          n   <= '0;
          if (err > $signed((CW+2)'(DEADBAND)) && tap != 0) begin
            tap      <= tap - 1'b1;
            tap_load <= 1'b1;
          end else if (err < -$signed((CW+2)'(DEADBAND)) && tap != 11'(TAP_MAX)) begin
            tap      <= tap + 1'b1;
            tap_load <= 1'b1;
          end
        end else begin
          sum <= sum_next;
          n   <= n + 1'b1;
        end
      end
    end
  end
endmodule
