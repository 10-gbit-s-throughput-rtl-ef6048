// tb_frame_pattern_detector: self-checking test of the A1A1A2A2 detector.
//
// A random bit stream is fed 16 bits per clock. About every 12 words the
// 32-bit pattern F6 F6 28 28 is written into the stream at a random bit
// position, and as often a copy with one random bit flipped (a near miss).
// The expected hit vector is computed straight from the recorded input: after
// m clock edges hit[k] must equal
// ({din(m-6), din(m-5), din(m-4)}[47-k -: 32] == F6F62828), the same timing
// as byte_shifter's output. Every offset must see at least one true hit.
module tb_frame_pattern_detector;
  localparam int W = 16;
  localparam int N = 6000;
  localparam logic [31:0] PAT = 32'hF6F6_2828;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] din;
  logic [W-1:0] hit;

  int checks = 0, failures = 0;
  int hits_seen[W];

  frame_pattern_detector #(.W(W)) dut (.clk, .rst_n, .din, .hit);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stream of words to send, built in advance.
  logic [W-1:0] s [N + 8];

  initial begin
    int m;
    logic [3*W-1:0] win;
    logic [W-1:0]   exp_h;
    int             pos, w0, b;
    logic [47:0]    seg;
    logic [31:0]    pat;

    for (int i = 0; i < N + 8; i++) s[i] = W'($urandom);
    // Plant patterns: bit position b inside word w0 (b = 0 is the MSB).
    for (int i = 8; i < N - 8; i += 6) begin
      w0  = i;
      b   = $urandom_range(0, W - 1);
      pat = PAT;
      if ($urandom_range(0, 1) == 1) pat[$urandom_range(0, 31)] ^= 1'b1;
      seg = {s[w0], s[w0+1], s[w0+2]};
      seg[47-b -: 32] = pat;
      {s[w0], s[w0+1], s[w0+2]} = seg;
    end

    rst_n = 1'b0;
    din   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = 0;
    while (m < N) begin
      @(negedge clk);
      if (m >= 7) begin
        win = {s[m-6], s[m-5], s[m-4]};
        for (int k = 0; k < W; k++) exp_h[k] = (win[3*W-1-k -: 32] == PAT);
        checks++;
        for (int k = 0; k < W; k++) if (exp_h[k]) hits_seen[k]++;
        if (hit !== exp_h) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %h exp %h", m, hit, exp_h);
        end
      end
      din = s[m+1];
      @(posedge clk);
      m++;
    end
    for (int k = 0; k < W; k++) begin
      checks++;
      if (hits_seen[k] == 0) begin
        failures++;
        $display("no true hit at offset %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
