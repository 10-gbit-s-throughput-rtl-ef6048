// stm64_pkg: constants and types shared by the STM-64 testchip datapath.
//
// The datapath is 16 lines wide and runs at 622 MHz, so two bytes of the
// STM-64 stream are handled per clock. The framing bytes A1/A2 and the frame
// size are the SDH (ITU-T G.707) values: an STM-64 frame is 9 rows of
// 270 x 64 bytes, i.e. 155520 bytes or 77760 two-byte words, and starts with
// 192 A1 bytes followed by 192 A2 bytes. The frame alignment states are this
// design's own encoding.
package stm64_pkg;

  localparam int unsigned DATA_W      = 16;        // parallel data lines
  localparam int unsigned BYTES_PER_W = DATA_W / 8;

  localparam logic [7:0] A1_BYTE = 8'hF6;
  localparam logic [7:0] A2_BYTE = 8'h28;

  // 9 rows x 270 columns x 64 STM-1s / 2 bytes per word
  localparam int unsigned STM64_FRAME_WORDS = 9 * 270 * 64 / BYTES_PER_W;
  // 3 x 64 A1 bytes, 3 x 64 A2 bytes
  localparam int unsigned STM64_A1_WORDS    = 3 * 64 / BYTES_PER_W;

  // Out-of-frame after this many consecutive frames without the pattern.
  localparam int unsigned LOSS_FRAMES_DEF = 4;

  typedef enum logic [1:0] {
    FA_HUNT    = 2'd0,   // searching all offsets for the A1A1A2A2 boundary
    FA_PRESYNC = 2'd1,   // candidate found, waiting one frame to confirm
    FA_SYNC    = 2'd2    // in frame
  } fa_state_e;

endpackage
