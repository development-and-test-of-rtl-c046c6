// Sampler and edge filter of the DDMTD phase monitor.
//
// The echo (or reference) signal is sampled by a chain of flip-flops clocked
// at an offset frequency F-dF just below the 125 MHz signal frequency F. The
// samples then form a slow beat signal at dF that reproduces the phase of the
// 125 MHz edge, magnified by F/dF. When the line also carries data, the beat
// signal oscillates during part of its period; the filter keeps only a clean
// rising edge: an AND of the N_ONES newest samples and of the inverted
// N_ZEROS older ones. tag is high for one clk_off cycle per beat period.
// The sampler chain and the AND with inverted inputs follow the design; the
// chain length (N_ONES + N_ZEROS) is this implementation's choice.
// Timing: tag rises N_ONES + 1 clk_off cycles after the first sample of the
// new level.
module ddmtd_deglitch #(
  parameter int unsigned N_ONES  = 4,
  parameter int unsigned N_ZEROS = 4
) (
  input  logic clk_off,
  input  logic rst,
  input  logic din,
  output logic tag
);
  localparam int unsigned N = N_ONES + N_ZEROS;
  logic [N-1:0] chain;   // chain[0] newest

  always_ff @(posedge clk_off) begin
    if (rst) begin
      chain <= '1;   // looks like "all high": no tag until a real low-to-high
      tag   <= 1'b0;
    end else begin
      chain <= {chain[N-2:0], din};
      tag   <= (&chain[N_ONES-1:0]) & ~(|chain[N-1:N_ONES]);
    end
  end
endmodule
