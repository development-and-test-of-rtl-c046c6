// Deterministic-latency gear box between two related clocks.
//
// Register A (IN_W*N_IN bits) shifts in one IN_W-bit word per clk_a cycle,
// newest word at the top. Register B (same width) shifts right by OUT_W bits
// per clk_b cycle and its low OUT_W bits feed the output serializer. The two
// clocks share an edge every N_IN clk_a and N_OUT clk_b periods
// (125 MHz x 4 = 156.25 MHz x 5 = 31.25 MHz for the 8B/10B link); at that
// edge Register B loads the whole of Register A. The edge is identified by
// the clock-cycle number cyc_b from cycle_tagger: the load happens at the
// edge after which cyc_b is 0. As both registers change only on the common
// edge grid, the latency from a word entering A to its last bit leaving B is
// the same after every power-up. The width N_IN*IN_W must equal N_OUT*OUT_W.
// Structure and default sizes follow the design; bit order (oldest word and
// low byte first on the line) is this implementation's choice.
module gearbox #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 5
) (
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             rst,
  input  logic [IN_W-1:0]  din,
  input  logic [2:0]       cyc_b,
  output logic [OUT_W-1:0] dout
);
  localparam int unsigned TOT = IN_W * N_IN;

  if (TOT != OUT_W * N_OUT) begin : g_bad_size
    $error("gearbox: IN_W*N_IN must equal OUT_W*N_OUT");
  end

  logic [TOT-1:0] reg_a;
  logic [TOT-1:0] reg_b;

  always_ff @(posedge clk_a) begin
    if (rst) reg_a <= '0;
    else     reg_a <= {din, reg_a[TOT-1:IN_W]};
  end

  always_ff @(posedge clk_b) begin
    if (rst)                           reg_b <= '0;
    else if (cyc_b == 3'(N_OUT - 1))   reg_b <= reg_a;
    else                               reg_b <= reg_b >> OUT_W;
  end

  assign dout = reg_b[OUT_W-1:0];
endmodule
