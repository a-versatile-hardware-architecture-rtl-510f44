// tb_sorting_array: random test of the FIFO linear insertion sorter.
//
// A reference model keeps the last N written samples in arrival order. After
// every clock the array must hold exactly those samples in non-increasing
// order, and the expired flag must mark a cell that holds the oldest one.
// Samples come from a small range so that ties are frequent; en is toggled at
// random so that holding is tested too. It also checks that each write takes
// one clock (no sorting latency).
module tb_sorting_array;
  localparam int DW = 8;
  localparam int N  = 8;

  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] d;
  logic [DW-1:0] x [N];
  logic [N-1:0]  expired;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist [$];   // oldest first
  logic [DW-1:0] srt  [$];

  sorting_array #(.DATA_W(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    int idx;
    srt = hist;
    srt.rsort();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (x[i] !== srt[i]) begin
        failures++;
        $display("FAIL cell %0d: got %0d expected %0d", i, x[i], srt[i]);
      end
    end
    checks++;
    if (!$onehot(expired)) begin
      failures++;
      $display("FAIL expired not one-hot %b", expired);
    end else begin
      idx = $clog2(expired);
      checks++;
      if (x[idx] !== hist[0]) begin
        failures++;
        $display("FAIL expired cell %0d holds %0d, oldest is %0d", idx, x[idx], hist[0]);
      end
    end
  endtask

  initial begin
    d = 0;
    for (int i = 0; i < N; i++) hist.push_back('0);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_state();
    for (int t = 0; t < 3000; t++) begin
      en = ($urandom_range(0, 9) != 0);
      d  = (t < 1500) ? DW'($urandom_range(0, 15)) : DW'($urandom);
      @(posedge clk); #1;
      if (en) begin
        void'(hist.pop_front());
        hist.push_back(d);
      end
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
