// FPGA logic of a 48-port optical clock distributor.
//
// A 125 MHz reference is distributed over fibre to up to 48 end points. The
// board has no spare multi-gigabit transceivers for this, so it uses the
// FPGA's ordinary I/O: six output serializers (8:1, 1 Gb/s) each drive a 1:8
// fanout chip and 8 SFP transmitters, and 48 ordinary differential inputs
// receive the 48 return fibres. This module holds everything digital around
// those primitives:
//   - N_GROUPS tx_group_encoder: per group, a clock, data or mixed clock+data
//     mode, chosen independently (ser_word -> output serializer);
//   - N_GROUPS phase_corrector: tap setting of each group's output delay line
//     (tap/tap_load -> delay primitive), regulating the echo phase seen on a
//     chosen RX port against a set point;
//   - N_RX dual_function_rx: user data from the "01"-pattern stream that each
//     input deserializer oversamples (rx_samples);
//   - N_RX+1 ddmtd_deglitch and N_RX ddmtd_phase_meter: phase of each echo
//     (rx_serial, sampled at clk_off = F-dF) against the reference clock;
//   - cycle_tagger, link8b10b_tx and dcm_link_tx: the deterministic-latency
//     1.25 GBd 8B/10B link and the scrambled 625 MBd duty-cycle link, both
//     towards 156.25 MHz serializers;
//   - gtp_align_ctrl: the far-end transceiver aligner of the Manchester
//     mode, brought out on its own ports (it runs on the receiving board).
// Clocks: clk_125 reference, clk_156 (156.25 MHz) and clk_31 (31.25 MHz)
// from a PLL with edges aligned to clk_125, clk_off the DDMTD offset clock,
// gtp_clk the transceiver's recovered clock. rst is synchronous in every
// domain and must be held for several cycles of the slowest clock.
// The partition and the counts 6 x 8 and 48 follow the design; port lists are
// this implementation's.
module clock_distributor_top
  import cd_pkg::*;
#(
  parameter int unsigned N_GROUPS = 6,
  parameter int unsigned N_RX     = 48
) (
  input  logic        clk_125,
  input  logic        clk_156,
  input  logic        clk_31,
  input  logic        clk_off,
  input  logic        rst,
  // transmit groups
  input  tx_mode_e    tx_mode      [N_GROUPS],
  input  logic        tx_use_prbs  [N_GROUPS],
  input  logic [1:0]  tx_user_bits [N_GROUPS],
  output logic        tx_data_take [N_GROUPS],
  output logic [7:0]  tx_ser_word  [N_GROUPS],
  // output delay regulation (clk_off domain)
  input  logic        reg_enable   [N_GROUPS],
  input  logic [15:0] reg_setpoint [N_GROUPS],
  input  logic [5:0]  reg_port_sel [N_GROUPS],
  output logic [10:0] dly_tap      [N_GROUPS],
  output logic        dly_tap_load [N_GROUPS],
  // receivers
  input  logic [7:0]  rx_samples   [N_RX],
  input  logic        rx_serial    [N_RX],
  output logic        rx_valid     [N_RX],
  output logic [1:0]  rx_bits      [N_RX],
  output logic        rx_aligned   [N_RX],
  output logic [3:0]  rx_ali_pos   [N_RX],
  output logic [15:0] echo_phase   [N_RX],
  output logic        echo_phase_valid [N_RX],
  // clock cycle numbering and 156.25 MHz links
  output logic [1:0]  cycles_125,
  output logic [2:0]  cycles_156,
  output logic        tagger_locked,
  output logic        k_msg_start,
  output logic [7:0]  k_ser_word,
  input  logic [1:0]  dcm_d,
  output logic [3:0]  dcm_ser_word,
  // far-end transceiver aligner of the Manchester link
  input  logic        gtp_clk,
  input  logic [15:0] gtp_rx_word,
  input  logic        gtp_reset_done,
  output logic        gtp_reset,
  output logic        gtp_aligned,
  output logic [15:0] gtp_trials,
  output logic [7:0]  gtp_rx_byte,
  output logic        gtp_rx_valid
);
  // ---------------- transmit groups
  for (genvar g = 0; g < N_GROUPS; g++) begin : g_tx
    tx_group_encoder u_enc (
      .clk(clk_125), .rst, .mode(tx_mode[g]), .use_prbs(tx_use_prbs[g]),
      .user_bits(tx_user_bits[g]), .data_take(tx_data_take[g]), .ser_word(tx_ser_word[g]));
  end

  // ---------------- receivers and DDMTD phase monitor
  logic ref_tag;
  logic echo_tag [N_RX];

  // the reference clock itself is sampled by the offset clock
  ddmtd_deglitch u_ref_dg (.clk_off, .rst, .din(clk_125), .tag(ref_tag));

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    dual_function_rx u_rx (
      .clk(clk_125), .rst, .samples(rx_samples[i]),
      .rx_valid(rx_valid[i]), .rx_bits(rx_bits[i]), .rx_aligned(rx_aligned[i]),
      .ali_pos(rx_ali_pos[i]), .ali_change(),
      .sco_l(), .sco_c(), .sco_r(), .sco_avg_l(), .sco_avg_c(), .sco_avg_r());
    ddmtd_deglitch u_dg (.clk_off, .rst, .din(rx_serial[i]), .tag(echo_tag[i]));
    ddmtd_phase_meter u_pm (
      .clk_off, .rst, .ref_tag, .echo_tag(echo_tag[i]),
      .phase(echo_phase[i]), .phase_valid(echo_phase_valid[i]));
  end

  // ---------------- output delay regulation per group
  for (genvar g = 0; g < N_GROUPS; g++) begin : g_reg
    logic [15:0] ph;
    logic        ph_v;
    always_comb begin
      ph   = '0;
      ph_v = 1'b0;
      for (int i = 0; i < int'(N_RX); i++)
        if (int'(reg_port_sel[g]) == i) begin
          ph   = echo_phase[i];
          ph_v = echo_phase_valid[i];
        end
    end
    phase_corrector u_corr (
      .clk(clk_off), .rst, .enable(reg_enable[g]), .setpoint(reg_setpoint[g]),
      .phase(ph), .phase_valid(ph_v), .tap(dly_tap[g]), .tap_load(dly_tap_load[g]));
  end

  // ---------------- 156.25 MHz links
  cycle_tagger u_tagger (
    .clk_31, .clk_125, .clk_156, .rst,
    .cycles_125, .cycles_156, .locked(tagger_locked));

  link8b10b_tx u_k_link (
    .clk_125, .clk_156, .rst, .cycles_156, .msg_start(k_msg_start), .ser_word(k_ser_word));

  dcm_link_tx u_dcm_link (
    .clk_125, .clk_156, .rst, .cycles_156, .d(dcm_d), .ser_word(dcm_ser_word));

  // ---------------- far-end transceiver aligner
  gtp_align_ctrl u_gtp_align (
    .clk(gtp_clk), .rst, .rx_word(gtp_rx_word), .gtp_reset_done,
    .gtp_reset, .aligned(gtp_aligned), .trials(gtp_trials),
    .rx_byte(gtp_rx_byte), .rx_valid(gtp_rx_valid));
endmodule
