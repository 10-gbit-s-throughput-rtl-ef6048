// stm64_testchip: processing core of an STM-64 (10 Gbit/s) regenerator front
// end, on a 16-line datapath clocked at 622 MHz (two bytes per clock).
//
// The unaligned stream from a 1:16 demultiplexer enters on din. Two blocks
// look at it side by side, like two interleaved cell columns: byte_shifter
// selects the 16-bit window at the current bit offset, and
// frame_pattern_detector checks all 16 offsets for the A1A1/A2A2 frame
// boundary. frame_aligner turns the hits into a locked offset, a frame pulse
// and the in-frame state. The aligned words and the frame pulse then feed
// byte_resorter, which spreads each group of 16 bytes over 16 serial lines:
// the 16 STM-4-like outputs, each one bit per clock (622 Mbit/s).
//
// Interface: clk, rst_n (asynchronous, active low), din[15:0] with bit 15
// earliest; outputs ser_out[15:0], ser_sync, the aligned word stream with its
// frame_pulse, in_frame, align_offset and the alignment state
// (HUNT / PRESYNC / SYNC). Timing: the aligned word leaves
// byte_shifter 5 clocks after the input word that completes it; frame_pulse
// marks the first A2A2 word; a byte group's MSBs appear on ser_out 8 clocks
// after its first aligned word. Frame alignment takes the frame in which the
// pattern is first seen plus one confirming frame.
//
// From the source design: the 16-line, 622 MHz, fully pipelined datapath and
// its functions (byte alignment, frame alignment, byte to bit-stream
// resorter, 16 STM-4-like outputs). This design's own choices: the SDH
// framing values and alignment rule, bit order, and the byte-to-line mapping.
module stm64_testchip
  import stm64_pkg::*;
#(
  parameter int unsigned W           = DATA_W,
  parameter int unsigned FRAME_WORDS = STM64_FRAME_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         din,
  output logic [W-1:0]         ser_out,
  output logic                 ser_sync,
  output logic [W-1:0]         aligned,
  output logic                 frame_pulse,
  output logic                 in_frame,
  output logic [$clog2(W)-1:0] align_offset,
  output fa_state_e            align_state
);
  logic [W-1:0]         hit;
  logic [$clog2(W)-1:0] offset;

  byte_shifter #(.W(W)) u_shifter (
    .clk, .rst_n, .din, .offset, .dout(aligned)
  );

  frame_pattern_detector #(.W(W)) u_detector (
    .clk, .rst_n, .din, .hit
  );

  frame_aligner #(.W(W), .FRAME_WORDS(FRAME_WORDS)) u_aligner (
    .clk, .rst_n, .hit, .offset, .frame_pulse, .in_frame, .state(align_state)
  );

  byte_resorter #(.W(W)) u_resorter (
    .clk, .rst_n, .din(aligned), .sync(frame_pulse), .ser_out, .ser_sync
  );

  assign align_offset = offset;

endmodule
