// byte_resorter: byte to bit-stream resorter. Turns the byte-aligned STM-64
// word stream (W/8 bytes per clock) into W serial bit streams, one bit per
// clock each, i.e. W STM-4-like signals at the clock rate.
//
// Every 8 clocks bring a group of W bytes. A collect register fills with the
// group while W shift registers send the previous group out; on the last word
// of a group all W bytes (the last W/8 straight from the input) are loaded
// into the shift registers at once. Byte j of a group (j = 0 is the first in
// time, in din[W-1 -: 8] of the first word) goes to ser_out[j], most
// significant bit first. With W = 16 line j therefore carries the bytes of
// STM-1 numbers j, j+16, j+32 and j+48 of a 64-way byte interleave.
//
// Interface: din (aligned, first byte in the high bits), sync marks a word
// that starts a group; without sync the group phase simply keeps counting
// 0..7. ser_out, and ser_sync which is high with the MSB of a group that began
// on a sync word. Timing: the MSB of byte j of a group that starts at clock t
// is on ser_out[j] in clock t + 8 and the LSB in clock t + 15. Throughput is
// exactly W bits in and W bits out per clock.
//
// From the source design: the resorter function and the 16 STM-4-like
// outputs. This design's own choices: the byte-to-line mapping, MSB first and
// the double-buffered structure.
module byte_resorter
  import stm64_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         sync,
  output logic [W-1:0] ser_out,
  output logic         ser_sync
);
  localparam int unsigned B = W / 8;    // bytes per word

  logic [2:0]    ph_q;                  // phase of the next word
  logic [7:0]    coll_q [W];            // bytes being collected
  logic [7:0]    sh_q   [W];            // bytes being sent
  logic          grp_sync_q, ser_sync_q;

  logic [2:0] ph;
  assign ph = sync ? 3'd0 : ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q       <= '0;
      grp_sync_q <= 1'b0;
      ser_sync_q <= 1'b0;
      for (int j = 0; j < W; j++) begin
        coll_q[j] <= '0;
        sh_q[j]   <= '0;
      end
    end else begin
      ph_q <= ph + 3'd1;
      if (ph == 3'd0) grp_sync_q <= sync;

      for (int b = 0; b < B; b++)
        coll_q[B*ph + b] <= din[W-1-8*b -: 8];

      if (ph == 3'd7) begin
        for (int j = 0; j < W - B; j++) sh_q[j] <= coll_q[j];
        for (int b = 0; b < B; b++)     sh_q[W-B+b] <= din[W-1-8*b -: 8];
        ser_sync_q <= grp_sync_q;
      end else begin
        for (int j = 0; j < W; j++) sh_q[j] <= {sh_q[j][6:0], 1'b0};
        ser_sync_q <= 1'b0;
      end
    end
  end

  for (genvar j = 0; j < W; j++) begin : g_out
    assign ser_out[j] = sh_q[j][7];
  end
  assign ser_sync = ser_sync_q;

endmodule
