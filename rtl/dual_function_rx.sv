// Data half of the dual-function receiver on an ordinary differential input.
//
// The sender transmits 16 ns frames of eight 500 MBd symbols "0 1 x y 0 1 ~x ~y":
// a fixed 125 MHz "01" edge (used elsewhere to measure the echo clock phase)
// and two user bits followed by their complement (125 Mb/s). The input is
// oversampled twice per symbol by an input deserializer that delivers
// 8 samples per 125 MHz cycle (samples[0] oldest). This block keeps the last
// 32 samples and, once per frame, takes three candidate symbol windows that
// start one sample apart (Left, Center, Right), each made of every second
// sample. Each window is scored against the plausible pattern: 6 rules
// (symbols 0,4 = 0; 1,5 = 1; 2 != 6; 3 != 7), score 0..6. Scores are
// averaged by leaky accumulators (acc += score - acc >> AVG_SHIFT); when a
// side average beats the center one, the sampling offset ali_pos moves one
// sample toward it, the averages restart from the new scores and decisions
// pause for HOLD_FRAMES frames. The 16 offsets span exactly one frame: a
// wrap from 15 to 0 skips one frame and a wrap from 0 to 15 repeats one, which
// is how a slow phase drift or small frequency offset of the sender is
// absorbed.
//
// Lock needs LOCK_RUN consecutive frames with a perfect Center score (6).
// This matters because a window half a frame off reads "0 1 ~x ~y | 0 1 x' y'"
// across two frames: it always meets the four "01" rules and meets each
// complement rule half of the time, so its mean score is 5 and it can beat
// its neighbours. Such a position rarely gives LOCK_RUN perfect frames in a
// row. A receiver that has not been locked for TRACK_FRAMES frames is in
// search mode: it ignores its neighbours and steps the offset by one sample
// after each hold until LOCK_RUN perfect frames come in a row. A receiver
// locked recently is in tracking mode and only follows the Left/Right
// comparison. The frame phase, and with it the data polarity, is therefore
// unambiguous.
//
// Output: one frame per two cycles, rx_valid with rx_bits = {y, x} of the
// Center window, one cycle after the frame's last sample arrived.
// The Left/Center/Right scoring and decision structure follows the design;
// the rule set, averaging, hold time and lock rule are this implementation's.
module dual_function_rx #(
  parameter int unsigned AVG_SHIFT   = 3,
  parameter int unsigned HOLD_FRAMES = 8,
  parameter int unsigned LOCK_RUN    = 8,
  parameter int unsigned TRACK_FRAMES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] samples,
  output logic       rx_valid,
  output logic [1:0] rx_bits,
  output logic       rx_aligned,
  output logic [3:0] ali_pos,
  output logic       ali_change,
  output logic [2:0] sco_l, sco_c, sco_r,
  output logic [2:0] sco_avg_l, sco_avg_c, sco_avg_r
);
  localparam int unsigned AW = 3 + AVG_SHIFT;

  logic [31:0]   hist;       // Q31..0, bit index grows with time
  logic          fph;        // frame phase: evaluate when 1
  logic [AW-1:0] acc_l, acc_c, acc_r;
  logic [3:0]    good_run;   // consecutive frames with a perfect Center score
  logic [5:0]    lost;       // frames since the receiver was last locked (saturates)
  logic [$clog2(HOLD_FRAMES+1)-1:0] hold;
  logic          fresh;      // first frame after an offset change

  function automatic logic [7:0] pick(input logic [31:0] h, input int unsigned base);
    for (int k = 0; k < 8; k++) pick[k] = h[base + 2*k];
  endfunction

  function automatic logic [2:0] score(input logic [7:0] s);
    score = 3'(!s[0]) + 3'(s[1]) + 3'(!s[4]) + 3'(s[5]) + 3'(s[2] ^ s[6]) + 3'(s[3] ^ s[7]);
  endfunction

  function automatic logic [AW-1:0] leak(input logic [AW-1:0] a, input logic [2:0] s);
    leak = a - (a >> AVG_SHIFT) + AW'(s);
  endfunction

  logic [7:0] win_l, win_c, win_r;
  logic [2:0] s_l, s_c, s_r;
  logic [2:0] a_l, a_c, a_r;

  always_comb begin
    win_l = pick(hist, 32'(ali_pos));
    win_c = pick(hist, 32'(ali_pos) + 1);
    win_r = pick(hist, 32'(ali_pos) + 2);
    s_l = score(win_l);
    s_c = score(win_c);
    s_r = score(win_r);
    a_l = 3'(acc_l >> AVG_SHIFT);
    a_c = 3'(acc_c >> AVG_SHIFT);
    a_r = 3'(acc_r >> AVG_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist       <= '0;
      fph        <= 1'b0;
      acc_l      <= '0;
      acc_c      <= '0;
      acc_r      <= '0;
      hold       <= '0;
      fresh      <= 1'b1;
      good_run   <= '0;
      lost       <= '1;
      ali_pos    <= '0;
      ali_change <= 1'b0;
      rx_valid   <= 1'b0;
      rx_bits    <= '0;
      rx_aligned <= 1'b0;
      sco_l <= '0; sco_c <= '0; sco_r <= '0;
    end else begin
      hist       <= {samples, hist[31:8]};
      fph        <= ~fph;
      ali_change <= 1'b0;
      rx_valid   <= 1'b0;
      if (fph) begin
        rx_valid <= 1'b1;
        rx_bits  <= {win_c[3], win_c[2]};
        sco_l <= s_l; sco_c <= s_c; sco_r <= s_r;
        if (s_c != 3'd6)        good_run <= '0;
        else if (good_run != '1) good_run <= good_run + 1'b1;
        if (fresh) begin
          acc_l <= AW'(s_l) << AVG_SHIFT;
          acc_c <= AW'(s_c) << AVG_SHIFT;
          acc_r <= AW'(s_r) << AVG_SHIFT;
          fresh <= 1'b0;
          hold  <= ($bits(hold))'(HOLD_FRAMES);
          good_run <= (s_c == 3'd6) ? 4'd1 : 4'd0;
        end else begin
          acc_l <= leak(acc_l, s_l);
          acc_c <= leak(acc_c, s_c);
          acc_r <= leak(acc_r, s_r);
          if (hold != 0) begin
            hold <= hold - 1'b1;
          end else if (lost >= 6'(TRACK_FRAMES)) begin
            // search mode: step onward until the Center window is perfect
            if (good_run < 4'(LOCK_RUN)) begin
              ali_pos    <= ali_pos + 4'd1;
              ali_change <= 1'b1;
              fresh      <= 1'b1;
            end
          end else if (a_r > a_c && a_r >= a_l) begin
            ali_pos    <= ali_pos + 4'd1;
            ali_change <= 1'b1;
            fresh      <= 1'b1;
          end else if (a_l > a_c) begin
            ali_pos    <= ali_pos - 4'd1;
            ali_change <= 1'b1;
            fresh      <= 1'b1;
          end
        end
        if (!fresh && hold == 0 && good_run >= 4'(LOCK_RUN)) lost <= '0;
        else if (lost != '1)                                  lost <= lost + 1'b1;
        rx_aligned <= !fresh && (hold == 0) && (good_run >= 4'(LOCK_RUN));
      end
    end
  end

  assign sco_avg_l = a_l;
  assign sco_avg_c = a_c;
  assign sco_avg_r = a_r;
endmodule
