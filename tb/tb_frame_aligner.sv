// tb_frame_aligner: self-checking test of the frame alignment controller.
//
// The hit vector is driven directly, with a short frame of 40 words. The
// script takes the controller through: hunting with no pattern; a lock on two
// offsets at once (the lowest must win); confirmation one frame later; frames
// in sync with spurious hits at other offsets and positions; three missed
// frames followed by a good one (must stay in frame); four missed frames
// (must lose frame exactly at the fourth); a candidate that is not confirmed
// (back to hunting); and a fresh lock. frame_pulse is checked in every clock:
// it must be high exactly one frame, 2 frames, ... after the locking hit.
module tb_frame_aligner;
  import stm64_pkg::*;
  localparam int W  = 16;
  localparam int FW = 40;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] hit;
  logic [3:0]   offset;
  logic         frame_pulse, in_frame;
  fa_state_e    state;

  int checks = 0, failures = 0;

  frame_aligner #(.W(W), .FRAME_WORDS(FW), .LOSS_FRAMES(4)) dut (
    .clk, .rst_n, .hit, .offset, .frame_pulse, .in_frame, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (state=%0d off=%0d fp=%0b inf=%0b)",
               $time, what, state, offset, frame_pulse, in_frame);
    end
  endtask

  // One clock: check frame_pulse against exp_fp, then apply h.
  task automatic cyc(input logic [W-1:0] h, input bit exp_fp);
    @(negedge clk);
    check(frame_pulse == exp_fp, "frame_pulse");
    hit = h;
    @(posedge clk);
    #1;
  endtask

  // One frame of FW clocks after a lock; the last clock is the mark, where
  // hit[off] is set if good. Spurious hits elsewhere throughout.
  task automatic frame(input int off, input bit good, input fa_state_e during);
    logic [W-1:0] h;
    for (int i = 1; i <= FW; i++) begin
      h = W'($urandom) & W'($urandom) & ~(W'(1) << off);
      if (i == FW && good) h[off] = 1'b1;
      if (i < FW) begin
        cyc(h, 1'b0);
        if (i < FW - 1) check(state == during, "state during frame");
      end else begin
        cyc(h, 1'b1);
      end
    end
  endtask

  initial begin
    hit   = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Hunting, nothing found.
    for (int i = 0; i < 50; i++) begin
      cyc('0, 1'b0);
      check(state == FA_HUNT && !in_frame, "idle hunt");
    end

    // Two offsets see the pattern: 3 must be chosen.
    cyc(16'h0088, 1'b0);
    check(state == FA_PRESYNC && offset == 4'd3, "lock on lowest offset");
    frame(3, 1'b1, FA_PRESYNC);
    check(state == FA_SYNC && in_frame, "confirmed -> in frame");

    // Good frames.
    repeat (3) begin
      frame(3, 1'b1, FA_SYNC);
      check(in_frame && offset == 4'd3, "stays in frame");
    end

    // Three misses then a good frame: no loss.
    repeat (3) begin
      frame(3, 1'b0, FA_SYNC);
      check(in_frame, "in frame after a miss");
    end
    frame(3, 1'b1, FA_SYNC);
    check(in_frame, "in frame after recovery");

    // Four misses: loss of frame exactly at the fourth.
    repeat (3) begin
      frame(3, 1'b0, FA_SYNC);
      check(in_frame, "in frame during misses");
    end
    frame(3, 1'b0, FA_SYNC);
    check(state == FA_HUNT && !in_frame, "loss of frame after 4 misses");

    // Candidate at offset 12 that is not confirmed.
    cyc('0, 1'b0);
    cyc(16'h1000, 1'b0);
    check(state == FA_PRESYNC && offset == 4'd12, "second lock");
    frame(12, 1'b0, FA_PRESYNC);
    check(state == FA_HUNT, "unconfirmed candidate dropped");

    // Fresh lock at offset 0.
    for (int i = 0; i < 5; i++) cyc('0, 1'b0);
    cyc(16'h0001, 1'b0);
    check(state == FA_PRESYNC && offset == 4'd0, "third lock");
    frame(0, 1'b1, FA_PRESYNC);
    frame(0, 1'b1, FA_SYNC);
    check(in_frame && offset == 4'd0, "in frame at offset 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
