// tb_byte_resorter: self-checking test of the byte to bit-stream resorter.
//
// Random words are fed every clock. sync marks a group start every 8 words,
// and twice during the run the group grid is moved (sync arrives in the
// middle of a group, which must abandon that group). The TB keeps the phase of
// every input word (0 on sync, else previous + 1 mod 8). For every complete
// group starting at input edge g, line j must carry bit 7-i of byte j of the
// group after edge g+7+i (i = 0..7), i.e. the MSB 8 clocks after the group's
// first word arrives; ser_sync must be high after edge g+7 exactly when the
// group started on sync. Lines are also counted: each output bit per clock.
module tb_byte_resorter;
  localparam int W = 16;
  localparam int N = 2000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] din;
  logic         sync;
  logic [W-1:0] ser_out;
  logic         ser_sync;

  int checks = 0, failures = 0, groups = 0, resyncs = 0;

  byte_resorter #(.W(W)) dut (.clk, .rst_n, .din, .sync, .ser_out, .ser_sync);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hd [N + 8];
  logic         hs [N + 8];
  int           hp [N + 8];

  initial begin
    int m, g, i, grid;
    logic [7:0] byte_j;
    logic [W-1:0] exp_s;
    rst_n = 1'b0;
    din   = '0;
    sync  = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = 0;
    grid = 5;                      // sync on words with index % 8 == grid
    for (int k = 0; k < N + 8; k++) hp[k] = -1;
    while (m < N) begin
      @(negedge clk);
      // Find the latest complete group whose output window covers edge m.
      g = -1;
      for (int k = m - 7; k >= 1 && k >= m - 14; k--)
        if (hp[k] == 0 && k + 7 <= m && hp[k+7] == 7) begin g = k; break; end
      if (g >= 0) begin
        i = m - g - 7;
        if (i >= 0 && i < 8) begin
          for (int j = 0; j < W; j++) begin
            byte_j = hd[g + j / 2][(j % 2 == 0) ? 15 : 7 -: 8];
            exp_s[j] = byte_j[7 - i];
          end
          checks++;
          if (ser_out !== exp_s) begin
            failures++;
            if (failures < 10) $display("edge %0d group %0d bit %0d: got %h exp %h", m, g, i, ser_out, exp_s);
          end
          checks++;
          if (ser_sync !== (i == 0 && hs[g])) begin
            failures++;
            if (failures < 10) $display("edge %0d: ser_sync %0b", m, ser_sync);
          end
          if (i == 0) groups++;
        end
      end
      // Next input word.
      if (m == 700 || m == 1400) begin grid = (grid + 3) % 8; resyncs++; end
      din  = W'($urandom);
      sync = ((m + 1) % 8 == grid) && ($urandom_range(0, 9) != 0);
      hd[m+1] = din;
      hs[m+1] = sync;
      hp[m+1] = sync ? 0 : (m == 0 ? 0 : (hp[m] + 1) % 8);
      @(posedge clk);
      m++;
    end
    checks++;
    if (groups < 200 || resyncs != 2) begin
      failures++;
      $display("too few groups checked: %0d", groups);
    end
    $display("groups=%0d", groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
