// tb_stm64_testchip_offsets: end-to-end test of the STM-64 testchip over all
// 16 bit offsets, with a short 128-word frame (8 words of A1A1, 8 of A2A2).
//
// The stream starts at offset 0. For each later offset the input slips to the
// new bit offset and the framing of four frames is damaged, so the core must
// lose frame and re-acquire at the new offset. Between slips, while in frame,
// every clock is checked as in the full-size test: offset, aligned word
// (5 clocks after the input word), frame_pulse on the first A2A2 word, all 16
// serial lines (MSB of a group 8 clocks after its first aligned word) and
// ser_sync. Every offset must be acquired once and checked for at least one
// full frame.
module tb_stm64_testchip_offsets;
  import stm64_pkg::*;
  localparam int W   = 16;
  localparam int FW  = 128;
  localparam int NA1 = 8;
  localparam int FRAMES_PER_OFFSET = 9;
  localparam int NCYC = 16 * FRAMES_PER_OFFSET * FW + 4 * FW;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] din;
  logic [W-1:0] ser_out, aligned;
  logic         ser_sync, frame_pulse, in_frame;
  logic [3:0]   align_offset;
  fa_state_e    align_state;

  int checks = 0, failures = 0;
  int words_at[16];
  bit acquired_at[16];

  stm64_testchip #(.W(W), .FRAME_WORDS(FW)) dut (
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
      if (failures < 20) $display("FAIL edge %0d: %s (d=%0d)", m, what, align_offset);
    end
  endtask

  logic [W-1:0] aw [64];

  initial begin
    int m, d, g, i, steady, p, f, seg;
    logic [W-1:0] w, prev_w;
    logic [2*W-1:0] two;
    logic [7:0] b;
    logic [W-1:0] exp_s;
    bit ok, prev_inf;

    rst_n = 1'b0;
    din   = '0;
    d     = 0;
    prev_w = '0;
    steady = 0;
    ok = 1'b0;
    prev_inf = 1'b0;
    for (int k = 0; k < 64; k++) aw[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = 0;
    while (m < NCYC) begin
      @(negedge clk);
      if (!prev_inf && in_frame) begin
        check(int'(align_offset) == d, "acquired offset", m);
        if (int'(align_offset) == d) acquired_at[d] = 1'b1;
        ok = 1'b1;
      end
      prev_inf = in_frame;
      if (in_frame) steady++; else steady = 0;

      if (in_frame && ok && steady > 24) begin
        check(int'(align_offset) == d, "offset", m);
        check(aligned == aw[(m-5) % 64], "aligned word", m);
        check(frame_pulse == ((m - 5) % FW == NA1), "frame_pulse", m);
        g = m - 13;
        while (((g % FW) - NA1) % 8 != 0) g--;
        i = m - 13 - g;
        for (int j = 0; j < W; j++) begin
          b = aw[(g + j / 2) % 64][(j % 2 == 0) ? 15 : 7 -: 8];
          exp_s[j] = b[7 - i];
        end
        check(ser_out == exp_s, "serial lines", m);
        check(ser_sync == (i == 0 && (g % FW) == NA1), "ser_sync", m);
        words_at[d]++;
      end

      // Next word; frame f = (m+1) / FW, segment of 9 frames per offset.
      p   = (m + 1) % FW;
      f   = (m + 1) / FW;
      seg = f / FRAMES_PER_OFFSET;
      if (p < NA1)          w = {A1_BYTE, A1_BYTE};
      else if (p < 2 * NA1) w = {A2_BYTE, A2_BYTE};
      else                  w = W'($urandom);
      // Slip to the next offset, then damage four frames.
      if (seg > 0 && seg < 16 && f % FRAMES_PER_OFFSET == 0 && p == 20) begin
        d  = seg;
        ok = 1'b0;
      end
      if (seg > 0 && p == NA1 && f % FRAMES_PER_OFFSET < 4)
        w = {A2_BYTE, A2_BYTE ^ 8'h80};
      aw[(m + 1) % 64] = w;
      two = {prev_w, w};
      din = two[W - 1 + d -: W];
      prev_w = w;
      @(posedge clk);
      m++;
    end

    for (int k = 0; k < 16; k++) begin
      check(acquired_at[k], "offset acquired", k);
      check(words_at[k] >= FW, "offset checked for a frame", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
