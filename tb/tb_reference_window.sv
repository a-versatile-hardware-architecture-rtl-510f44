// tb_reference_window: one reference window of N = 16 cells fed random
// samples, with en and the rank changed at random. After every clock it checks
// against a model that keeps the last N samples in arrival order: the sorted
// cells, the oldest sample (what leaves the window next), the running sum and
// mean, and the sample of the requested ascending rank.
module tb_reference_window;
  localparam int DW = 12;
  localparam int N  = 16;
  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] d, oldest, y_mean, y_rank;
  logic [4:0]    rank;
  logic [DW+3:0] sum;
  logic [DW-1:0] sorted [N];
  logic [N-1:0]  expired;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist [$];
  logic [DW-1:0] asc  [$];

  reference_window #(.DATA_W(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int s;
    for (int i = 0; i < N; i++) hist.push_back('0);
    d = 0; rank = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 2500; t++) begin
      en   = ($urandom_range(0, 9) != 0);
      d    = (t < 800) ? DW'($urandom_range(0, 31)) : DW'($urandom);
      @(posedge clk); #1;
      if (en) begin
        void'(hist.pop_front());
        hist.push_back(d);
      end
      rank = 5'($urandom_range(1, N));
      #1;
      asc = hist;
      asc.sort();
      s = 0;
      foreach (hist[i]) s += int'(hist[i]);
      chk("oldest", oldest, hist[0]);
      chk("sum", sum, s);
      chk("mean", y_mean, s / N);
      chk("rank", y_rank, asc[rank-1]);
      for (int i = 0; i < N; i++) chk("sorted", sorted[i], asc[N-1-i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
