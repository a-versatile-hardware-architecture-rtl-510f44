// tb_guard_cut_shift: checks that the CUT is the sample written M+1 writes ago
// and the output the one written 2M+1 writes ago, with random en.
module tb_guard_cut_shift;
  localparam int DW = 12;
  localparam int M  = 4;
  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] d, cut, q;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist [$];   // newest first

  guard_cut_shift #(.DATA_W(DW), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 * M + 1; i++) hist.push_back('0);
    d = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      en = ($urandom_range(0, 3) != 0);
      d  = DW'($urandom);
      @(posedge clk); #1;
      if (en) begin
        hist.push_front(d);
        void'(hist.pop_back());
      end
      checks++;
      if (cut !== hist[M] || q !== hist[2*M]) begin
        failures++;
        $display("FAIL t=%0d cut=%0d q=%0d expected %0d %0d", t, cut, q, hist[M], hist[2*M]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
