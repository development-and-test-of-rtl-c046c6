`timescale 1ns/1ps
// Testbench of tx_group_encoder. For every mode, with user data and with the
// internal PRBS, the serial stream each word stands for is rebuilt here from
// the mode's definition (clock shapes, PRBS-15 reference recurrence,
// "0 1 x y 0 1 ~x ~y" frames, Manchester with the framing byte) and compared
// word by word, one cycle after the inputs (registered output).
module tb_tx_group_encoder;
  import cd_pkg::*;
  logic clk = 0, rst = 1;
  tx_mode_e mode = TX_OFF;
  logic use_prbs = 0;
  logic [1:0] user_bits = 0;
  logic data_take;
  logic [7:0] ser_word;
  int checks = 0, failures = 0;
  bit ref_seq [$];

  localparam logic [7:0] FRAME = 8'h0F;

  tx_group_encoder dut (.clk, .rst, .mode, .use_prbs, .user_bits, .data_take, .ser_word);

  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (ser_word !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %b exp %b", what, ser_word, exp);
    end
  endtask

  task automatic run_mode(input tx_mode_e m, input logic up);
    int n = 15;            // index into the PRBS reference
    logic [7:0] exp;
    logic [1:0] xy;
    bit second = 0;
    // reset so the mode's PRBS source starts from its seed
    @(negedge clk); rst = 1; mode = m; use_prbs = up;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 80; c++) begin
      logic take_exp;
      user_bits = 2'($urandom);
      take_exp = 0;
      exp = '0;
      unique case (m)
        TX_OFF:      exp = '0;
        TX_CLK125:   for (int i = 0; i < 8; i++) exp[i] = (i < 4);
        TX_CLK250:   for (int i = 0; i < 8; i++) exp[i] = ((i / 2) % 2 == 0);
        TX_CLK500:   for (int i = 0; i < 8; i++) exp[i] = (i % 2 == 0);
        TX_PRBS_1G:  begin for (int i = 0; i < 8; i++) exp[i] = ref_seq[n + i]; n += 8; end
        TX_PRBS_500: begin for (int i = 0; i < 8; i++) exp[i] = ref_seq[n + i / 2]; n += 4; end
        TX_PRBS_250: begin for (int i = 0; i < 8; i++) exp[i] = ref_seq[n + i / 4]; n += 2; end
        TX_DCM_CLK: begin
          bit d;
          d = up ? ref_seq[n] : user_bits[0];
          if (up) n += 1;
          for (int i = 0; i < 8; i++) exp[i] = (i < (d ? 5 : 3));
          take_exp = 1;
        end
        TX_PAT01: begin
          bit sym [8];
          if (!second) begin
            xy = up ? {ref_seq[n + 1], ref_seq[n]} : user_bits;
            if (up) n += 2;
            take_exp = 1;
          end
          sym = '{0, 1, xy[0], xy[1], 0, 1, !xy[0], !xy[1]};
          for (int i = 0; i < 8; i++) exp[i] = sym[(second ? 4 : 0) + i / 2];
          second = !second;
        end
        TX_MANCH: begin
          logic [1:0] d, f;
          d = up ? {ref_seq[n + 1], ref_seq[n]} : user_bits;
          if (up) n += 2;
          f = d ^ FRAME[2 * (c % 4) +: 2];
          for (int j = 0; j < 2; j++)
            for (int i = 0; i < 4; i++) exp[4 * j + i] = (i < 2) ? f[j] : !f[j];
          take_exp = 1;
        end
        default: ;
      endcase
      #1;
      checks++;
      if (data_take !== take_exp) begin
        failures++;
        $display("%s: data_take %0b", m.name(), data_take);
      end
      @(negedge clk);
      check(exp, m.name());
    end
  endtask

  initial begin
    for (int i = 0; i < 15; i++) ref_seq.push_back(1'b1);
    for (int i = 15; i < 2000; i++) ref_seq.push_back(ref_seq[i-15] ^ ref_seq[i-14]);
    repeat (2) @(negedge clk);
    for (int m = 0; m <= 9; m++) begin
      run_mode(tx_mode_e'(m), 1'b0);
      run_mode(tx_mode_e'(m), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
