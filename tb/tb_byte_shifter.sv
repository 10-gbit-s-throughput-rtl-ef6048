// tb_byte_shifter: self-checking test of the byte alignment shifter.
//
// Random 16-bit words are fed every clock while the offset changes at random
// moments. Each output word is compared with the window taken directly from
// the recorded input: after m clock edges, dout must equal
// {din(m-5), din(m-4)}[31-k -: 16] with k the offset applied with din(m-4),
// where din(n) is the word sampled at edge n. This also checks the 4-clock
// delay from the sampling edge (5 clocks from the word's arrival to output).
module tb_byte_shifter;
  localparam int W = 16;
  localparam int N = 3000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] din;
  logic [3:0]   offset;
  logic [W-1:0] dout;

  int checks = 0, failures = 0;
  int offsets_seen[16];

  byte_shifter #(.W(W)) dut (.clk, .rst_n, .din, .offset, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hd [N + 8];
  logic [3:0]   ho [N + 8];

  initial begin
    int m;
    logic [2*W-1:0] win;
    logic [W-1:0]   exp_w;
    rst_n  = 1'b0;
    din    = '0;
    offset = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = 0;                       // edges since reset release
    for (int i = 0; i < 8; i++) begin hd[i] = '0; ho[i] = '0; end
    while (m < N) begin
      @(negedge clk);
      if (m >= 6) begin
        win   = {hd[m-5], hd[m-4]};
        exp_w = win[2*W-1 - int'(ho[m-4]) -: W];
        checks++;
        offsets_seen[ho[m-4]]++;
        if (dout !== exp_w) begin
          failures++;
          if (failures < 10)
            $display("mismatch at %0d: off=%0d got %h exp %h", m, ho[m-4], dout, exp_w);
        end
      end
      din = W'($urandom);
      if ($urandom_range(0, 19) == 0) offset = 4'($urandom);
      hd[m+1] = din;
      ho[m+1] = offset;
      @(posedge clk);
      m++;
    end
    foreach (offsets_seen[k]) begin
      checks++;
      if (offsets_seen[k] == 0) begin
        failures++;
        $display("offset %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
