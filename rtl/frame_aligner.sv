// frame_aligner: frame alignment controller for the STM-64 testchip.
//
// Works on the hit vector of frame_pattern_detector. In HUNT it watches all
// W offsets; the first clock with any hit locks that offset (lowest index if
// several hit) and starts a word counter of FRAME_WORDS words (PRESYNC). When
// the counter returns to zero one frame later, the pattern must be there again
// at the locked offset, or the search restarts. Once confirmed the aligner is
// in frame (SYNC) and checks the pattern once per frame: LOSS_FRAMES
// consecutive frames without it send it back to HUNT; a single good frame
// clears the miss count. Hits anywhere else are ignored while locked.
//
// Interface: hit[W-1:0] in; offset (to byte_shifter), frame_pulse, in_frame
// and state out. Timing: frame_pulse is high in the clock in which the hit of
// a frame is expected, i.e. in the same clock as byte_shifter presents the
// first A2A2 word when detector and shifter share a latency. All outputs are
// registers or decoded from registers.
//
// From the source design: frame alignment is one of the testchip's functions.
// This design's own choices: the HUNT/PRESYNC/SYNC rule, which follows the
// usual SDH practice (ITU-T G.783), one confirming frame, and LOSS_FRAMES = 4.
module frame_aligner
  import stm64_pkg::*;
#(
  parameter int unsigned W           = DATA_W,
  parameter int unsigned FRAME_WORDS = STM64_FRAME_WORDS,
  parameter int unsigned LOSS_FRAMES = LOSS_FRAMES_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         hit,
  output logic [$clog2(W)-1:0] offset,
  output logic                 frame_pulse,
  output logic                 in_frame,
  output fa_state_e            state
);
  localparam int unsigned CW = $clog2(FRAME_WORDS);
  localparam int unsigned MW = $clog2(LOSS_FRAMES + 1);

  fa_state_e               state_q;
  logic [CW-1:0]           cnt_q;
  logic [MW-1:0]           miss_q;
  logic [$clog2(W)-1:0]    off_q;

  // Lowest offset that sees the pattern.
  logic [$clog2(W)-1:0] first_hit;
  always_comb begin
    first_hit = '0;
    for (int k = W - 1; k >= 0; k--)
      if (hit[k]) first_hit = k[$clog2(W)-1:0];
  end

  logic at_mark, mark_ok;
  assign at_mark = (state_q != FA_HUNT) && (cnt_q == '0);
  assign mark_ok = hit[off_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= FA_HUNT;
      cnt_q   <= '0;
      miss_q  <= '0;
      off_q   <= '0;
    end else begin
      // The frame counter wraps every FRAME_WORDS clocks once locked.
      if (state_q != FA_HUNT)
        cnt_q <= (cnt_q == CW'(FRAME_WORDS - 1)) ? '0 : cnt_q + 1'b1;

      unique case (state_q)
        FA_HUNT: begin
          if (|hit) begin
            off_q   <= first_hit;
            cnt_q   <= CW'(1);
            miss_q  <= '0;
            state_q <= FA_PRESYNC;
          end
        end
        FA_PRESYNC: begin
          if (at_mark)
            state_q <= mark_ok ? FA_SYNC : FA_HUNT;
        end
        FA_SYNC: begin
          if (at_mark) begin
            if (mark_ok) begin
              miss_q <= '0;
            end else if (miss_q == MW'(LOSS_FRAMES - 1)) begin
              miss_q  <= '0;
              state_q <= FA_HUNT;
            end else begin
              miss_q <= miss_q + 1'b1;
            end
          end
        end
        default: state_q <= FA_HUNT;
      endcase
    end
  end

  assign offset      = off_q;
  assign frame_pulse = at_mark;
  assign in_frame    = (state_q == FA_SYNC);
  assign state       = state_q;

  // The locked offset may only change while hunting.
  a_offset_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != FA_HUNT) |=> (off_q == $past(off_q)));
  // SYNC is only entered from PRESYNC on a confirmed mark.
  a_sync_entry: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != FA_SYNC) ##1 (state_q == FA_SYNC) |-> $past(state_q == FA_PRESYNC && mark_ok));

endmodule
