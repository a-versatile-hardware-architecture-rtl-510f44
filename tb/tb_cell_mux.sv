// tb_cell_mux: checks that every select value returns its own cell, with
// random cell contents.
module tb_cell_mux;
  localparam int DW = 12;
  localparam int N  = 16;
  logic [DW-1:0] x [N];
  logic [3:0]    sel;
  logic [DW-1:0] y;
  int checks = 0, failures = 0;

  cell_mux #(.DATA_W(DW), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) x[i] = DW'($urandom);
      for (int s = 0; s < N; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (y !== x[s]) begin
          failures++;
          $display("FAIL sel=%0d got %0d expected %0d", s, y, x[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
