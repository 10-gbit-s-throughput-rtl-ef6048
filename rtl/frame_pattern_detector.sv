// frame_pattern_detector: searches the unaligned stream for the SDH frame
// boundary, the last A1 A1 bytes followed by the first A2 A2 bytes, at every
// one of the W possible bit offsets in parallel.
//
// A 3W-bit window {w(t-2), w(t-1), w(t)} is formed. For offset k the 32 bits
// that end 16 bits into the aligned word {w(t-1), w(t)}[2W-1-k -: W] (for
// W = 16: the 32 bits starting k bits into the window) are compared with
// {A1,A1,A2,A2}. The
// comparison is split so that no flip-flop has more than a small function in
// front of it: per-nibble equality, then three levels of 2-input AND, each
// registered. If hit[k] is high, then with offset k the aligned word
// {w(t-1), w(t)}[2W-1-k -: W] is A2A2 and the aligned word before it A1A1.
//
// Interface: din in, hit[W-1:0] out. Timing: hit has the same latency as
// byte_shifter (clog2(W)+1 clocks; 5 for W = 16), so hit[k] is high in the
// same clock as byte_shifter, run at offset k, presents the A2A2 word.
//
// From the source design: frame alignment on the 16-line datapath, shallow
// logic per flip-flop. This design's own choices: the SDH A1/A2 values used as
// pattern (from G.707), the 32-bit pattern length and the split of the
// comparison into stages.
module frame_pattern_detector
  import stm64_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter logic [7:0]  A1 = A1_BYTE,
  parameter logic [7:0]  A2 = A2_BYTE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] hit
);
  localparam int unsigned LATENCY = $clog2(W) + 1;
  localparam int unsigned PAD     = (LATENCY > 5) ? LATENCY - 5 : 0;
  localparam logic [31:0] PATTERN = {A1, A1, A2, A2};

  logic [W-1:0]   p1_q, p2_q;
  logic [3*W-1:0] win_q;
  logic [7:0]     nib_q [W];   // nibble matches per offset
  logic [3:0]     and4_q[W];
  logic [1:0]     and2_q[W];
  logic [W-1:0]   hit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q  <= '0;
      p2_q  <= '0;
      win_q <= '0;
    end else begin
      p1_q  <= din;
      p2_q  <= p1_q;
      win_q <= {p2_q, p1_q, din};
    end
  end

  for (genvar k = 0; k < W; k++) begin : g_off
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        nib_q[k]  <= '0;
        and4_q[k] <= '0;
        and2_q[k] <= '0;
        hit_q[k]  <= 1'b0;
      end else begin
        for (int n = 0; n < 8; n++)
          nib_q[k][n] <= (win_q[2*W+15-k-4*(7-n) -: 4] == PATTERN[4*n +: 4]);
        for (int n = 0; n < 4; n++)
          and4_q[k][n] <= nib_q[k][2*n] & nib_q[k][2*n+1];
        for (int n = 0; n < 2; n++)
          and2_q[k][n] <= and4_q[k][2*n] & and4_q[k][2*n+1];
        hit_q[k] <= and2_q[k][0] & and2_q[k][1];
      end
    end
  end

  // Extra registers for wider datapaths, where byte_shifter is deeper.
  if (PAD == 0) begin : g_nopad
    assign hit = hit_q;
  end else begin : g_pad
    logic [W-1:0] dly_q [PAD];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < PAD; i++) dly_q[i] <= '0;
      end else begin
        dly_q[0] <= hit_q;
        for (int i = 1; i < PAD; i++) dly_q[i] <= dly_q[i-1];
      end
    end
    assign hit = dly_q[PAD-1];
  end

endmodule
