// tb_stm64_testchip: end-to-end test of the STM-64 testchip at its default
// size (77760 two-byte words per frame, 16 lines).
//
// A generator builds STM-64-like frames, 96 words of A1A1, 96 words of A2A2
// and random payload, and sends them as a bit stream delayed by D bits, cut
// into 16-bit words (bit 15 first), as an unaligned demultiplexer would. The
// run goes through the mechanisms of the chip:
//   - a false framing pattern in the payload while hunting, which must be
//     rejected one frame later (presync failure);
//   - acquisition at offset D;
//   - one frame with a damaged A2 byte while in frame (no loss);
//   - a bit slip of the input (D changes), and four damaged frames, which
//     must cause loss of frame;
//   - re-acquisition at the new offset.
// While in frame every clock is checked: align_offset == D, the aligned word
// equals the word sent 5 clocks before, frame_pulse marks the first A2A2
// word, and each of the 16 serial lines carries its byte of each 16-byte
// group MSB first, 8 clocks after the group's aligned word, with ser_sync on
// the group that starts with the A2 bytes. Each mechanism is counted and must
// have happened.
module tb_stm64_testchip;
  import stm64_pkg::*;
  localparam int W     = 16;
  localparam int FW    = STM64_FRAME_WORDS;
  localparam int NA1   = STM64_A1_WORDS;
  localparam int START = FW - 3000;          // stream starts 3000 words before a frame
  localparam int LAST_FRAME = 15;
  localparam int NCYC  = LAST_FRAME * FW - START;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] din;
  logic [W-1:0] ser_out, aligned;
  logic         ser_sync, frame_pulse, in_frame;
  logic [3:0]   align_offset;
  fa_state_e    align_state;

  int checks = 0, failures = 0;
  int n_acquire = 0, n_presync_fail = 0, n_miss_survived = 0, n_loss = 0, n_slip = 0;
  int n_groups = 0, n_frame_pulses = 0, n_words = 0;

  stm64_testchip dut (
    .clk, .rst_n, .din, .ser_out, .ser_sync, .aligned, .frame_pulse,
    .in_frame, .align_offset, .align_state);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int m);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL edge %0d: %s", m, what);
    end
  endtask

  function automatic int fpos(input int n);  return (n + START) % FW; endfunction
  function automatic int fnum(input int n);  return (n + START) / FW; endfunction

  logic [W-1:0] aw [64];                      // words sent, by edge index mod 64

  initial begin
    int m, d, g, i, steady, p, f;
    logic [W-1:0] w, prev_w;
    logic [2*W-1:0] two;
    logic [7:0] b;
    logic [W-1:0] exp_s;
    bit ok_to_check, prev_inf, miss_frame_active;
    fa_state_e prev_state;
    int prev_off;

    rst_n = 1'b0;
    din   = '0;
    d     = 11;
    prev_w = '0;
    steady = 0;
    ok_to_check = 1'b0;
    prev_inf = 1'b0;
    prev_state = FA_HUNT;
    prev_off = -1;
    miss_frame_active = 1'b0;
    for (int k = 0; k < 64; k++) aw[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = 0;
    while (m < NCYC) begin
      @(negedge clk);
      // ---- mechanism bookkeeping
      if (prev_state == FA_PRESYNC && align_state == FA_HUNT) n_presync_fail++;
      if (prev_state == FA_SYNC && align_state == FA_HUNT) n_loss++;
      if (!prev_inf && in_frame) begin
        n_acquire++;
        check(int'(align_offset) == d, "acquired offset", m);
        if (prev_off >= 0 && prev_off != int'(align_offset)) n_slip++;
        prev_off = int'(align_offset);
        ok_to_check = 1'b1;
        steady = 0;
      end
      prev_inf   = in_frame;
      prev_state = align_state;
      if (in_frame) steady++; else steady = 0;

      // ---- data checks while in frame
      if (in_frame && ok_to_check && steady > 24 && m > 40) begin
        check(int'(align_offset) == d, "offset", m);
        check(aligned == aw[(m-5) % 64], "aligned word", m);
        check(frame_pulse == (fpos(m-5) == NA1), "frame_pulse", m);
        n_words++;
        if (frame_pulse) n_frame_pulses++;
        // Serial lines: group start g with (fpos(g) - NA1) % 8 == 0, m = g+13+i.
        g = m - 13;
        while (((fpos(g) - NA1) % 8 + 8) % 8 != 0) g--;
        i = m - 13 - g;
        for (int j = 0; j < W; j++) begin
          b = aw[(g + j / 2) % 64][(j % 2 == 0) ? 15 : 7 -: 8];
          exp_s[j] = b[7 - i];
        end
        check(ser_out == exp_s, "serial lines", m);
        check(ser_sync == (i == 0 && fpos(g) == NA1), "ser_sync", m);
        if (i == 0) n_groups++;
      end

      // ---- next word of the stream (edge index m+1)
      p = fpos(m + 1);
      f = fnum(m + 1);
      if (p < NA1)            w = {A1_BYTE, A1_BYTE};
      else if (p < 2 * NA1)   w = {A2_BYTE, A2_BYTE};
      else                    w = W'($urandom);
      // False pattern in the payload while hunting in frame 0.
      if (f == 0 && p == FW - 2000) w = {A1_BYTE, A1_BYTE};
      if (f == 0 && p == FW - 1999) w = {A2_BYTE, A2_BYTE};
      // Damaged first A2 word: frame 6 (single miss), frames 8..11 (loss).
      if (p == NA1 && (f == 6 || (f >= 8 && f <= 11))) w = {A2_BYTE ^ 8'h01, A2_BYTE};
      if (p == NA1 + 1 && f == 6) miss_frame_active = 1'b1;
      if (p == NA1 + 100 && f == 6 && miss_frame_active) begin
        if (in_frame) n_miss_survived++;
        miss_frame_active = 1'b0;
      end
      // Bit slip of the input in frame 9.
      if (f == 9 && p == 500) begin
        d = 4;
        ok_to_check = 1'b0;
      end
      aw[(m + 1) % 64] = w;
      two = {prev_w, w};
      din = two[W - 1 + d -: W];
      prev_w = w;
      @(posedge clk);
      m++;
    end

    $display("acquisitions=%0d presync_failures=%0d single_miss_survived=%0d losses=%0d offset_changes=%0d",
             n_acquire, n_presync_fail, n_miss_survived, n_loss, n_slip);
    $display("words_checked=%0d groups_checked=%0d frame_pulses=%0d", n_words, n_groups, n_frame_pulses);
    check(n_acquire == 2, "two acquisitions", m);
    check(n_presync_fail >= 1, "presync failure happened", m);
    check(n_miss_survived == 1, "single miss survived", m);
    check(n_loss == 1, "one loss of frame", m);
    check(n_slip == 1, "re-alignment to a new offset", m);
    check(n_frame_pulses >= 6, "frame pulses seen", m);
    check(n_groups > 50000, "serial groups checked", m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
