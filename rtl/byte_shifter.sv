// byte_shifter: byte alignment of the unaligned 16-bit input stream.
//
// The input carries the serial STM-64 stream 16 bits per clock, bit W-1
// earliest. A byte may start at any of the W bit positions, so the aligned
// word for offset k is bits [2W-1-k -: W] of {previous word, current word}.
// The selection is a logarithmic shifter: stage s shifts by 2^s bits or not,
// a 2:1 mux per bit followed by a register, which keeps every flip-flop's
// input logic to depth <= 2 as the cell-column architecture requires. The
// offset is carried along the pipeline with its data, so a change of offset
// takes effect cleanly on one word boundary.
//
// Interface: din/offset in, dout out. Timing: dout is LATENCY = OFF_W + 1
// clocks after the din word that completes it (one input register, then one
// register per shift stage).
//
// From the source design: byte alignment on a 16-line, 622 MHz datapath with
// logic depth <= 2 per flip-flop. This design's own choices: the log-shifter
// structure, the bit order and the latency.
module byte_shifter
  import stm64_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         din,
  input  logic [$clog2(W)-1:0] offset,
  output logic [W-1:0]         dout
);
  localparam int unsigned S = $clog2(W);

  // Stage 0 holds the 2W-bit window {previous, current}; each later stage
  // drops 2^s bits from the top of the window when its offset bit is set.
  logic [2*W-1:0] win   [S+1];
  logic [S-1:0]   off_q [S+1];
  logic [W-1:0]   prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q   <= '0;
      win[0]   <= '0;
      off_q[0] <= '0;
    end else begin
      prev_q   <= din;
      win[0]   <= {prev_q, din};
      off_q[0] <= offset;
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        win[s+1]   <= '0;
        off_q[s+1] <= '0;
      end else begin
        win[s+1]   <= off_q[s][s] ? (win[s] << (1 << s)) : win[s];
        off_q[s+1] <= off_q[s];
      end
    end
  end

  assign dout = win[S][2*W-1 -: W];

  // Unused low half of the final window stage and offset is only carried.
  logic unused;
  assign unused = ^{win[S][W-1:0], off_q[S]};

endmodule
