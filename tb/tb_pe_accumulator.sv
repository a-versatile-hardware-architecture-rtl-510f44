// tb_pe_accumulator: the accumulator is fed the samples entering a window of N
// and the samples leaving it (N writes earlier), as in the processor. After
// every clock its sum must equal the sum of the window recomputed from
// scratch, and y must equal that sum divided by N. en is toggled at random.
module tb_pe_accumulator;
  localparam int DW = 12;
  localparam int N  = 16;
  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] in_value, out_value, y;
  logic [DW+3:0] acc;
  int checks = 0, failures = 0;
  logic [DW-1:0] win [$];

  pe_accumulator #(.DATA_W(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int i = 0; i < N; i++) win.push_back('0);
    in_value = 0; out_value = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom_range(0, 7) != 0);
      in_value  = (t % 500 < 100) ? DW'(4095) : DW'($urandom);
      out_value = win[0];
      @(posedge clk); #1;
      if (en) begin
        void'(win.pop_front());
        win.push_back(in_value);
      end
      s = 0;
      foreach (win[i]) s += int'(win[i]);
      checks++;
      if (int'(acc) != s || int'(y) != s / N) begin
        failures++;
        $display("FAIL t=%0d acc=%0d y=%0d expected %0d %0d", t, acc, y, s, s / N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
