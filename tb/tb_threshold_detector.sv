// tb_threshold_detector: checks the alpha * Z product, its integer part and
// the decision CUT >= alpha * Z, with alpha = 973/1024 (0.9501953125) and with
// random alphas, including CUT values just below, at and above the threshold.
module tb_threshold_detector;
  localparam int DW = 12, AW = 16, AF = 10;
  logic [DW-1:0] z, cut;
  logic [AW-1:0] alpha;
  logic [DW+AW-1:0] threshold;
  logic [DW+AW-AF-1:0] threshold_int;
  logic detect;
  int checks = 0, failures = 0;

  threshold_detector #(.DATA_W(DW), .ALPHA_W(AW), .ALPHA_FRAC(AF)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    longint prod = longint'(z) * longint'(alpha);
    logic e = (longint'(cut) * 1024) >= prod;
    #1;
    checks++;
    if (longint'(threshold) != prod || longint'(threshold_int) != prod / 1024 || detect !== e) begin
      failures++;
      $display("FAIL z=%0d a=%0d cut=%0d: thr=%0d int=%0d det=%b, expected %0d %0d %b",
               z, alpha, cut, threshold, threshold_int, detect, prod, prod / 1024, e);
    end
  endtask

  initial begin
    // alpha = 0.9501953125, Z = 1024 -> threshold exactly 973.
    alpha = 973; z = 1024;
    cut = 972; chk();
    cut = 973; chk();
    cut = 974; chk();
    checks++;
    if (detect !== 1'b1 || threshold_int != 973) begin
      failures++;
      $display("FAIL fixed case");
    end
    // alpha = 1.0: the threshold equals Z, so CUT = Z must be a detection.
    alpha = 16'd1024;
    for (int t = 0; t < 100; t++) begin
      z = DW'($urandom); cut = z; chk();
    end
    for (int t = 0; t < 2000; t++) begin
      alpha = (t < 1000) ? 16'd973 : AW'($urandom);
      z     = DW'($urandom);
      cut   = (t % 2) ? DW'((longint'(z) * alpha) >> AF) : DW'($urandom);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
