// tb_cfar_sizes: runs the CFAR processor in the window sizes of the resource
// table: 8, 16 and 64 reference cells (n = 4, 8, 32 per side), each with four
// guard cells on each side, side by side with the default 32-cell build. Each
// size is checked against the reference model for all six detectors.
module tb_cfar_sizes;
  logic clk = 0;
  logic done [4];
  int   checks_i [4], failures_i [4], det_i [4];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfar_size_check #(.N(4),  .M(4)) u_n4  (.clk, .done(done[0]), .checks(checks_i[0]), .failures(failures_i[0]), .detections(det_i[0]));
  cfar_size_check #(.N(8),  .M(4)) u_n8  (.clk, .done(done[1]), .checks(checks_i[1]), .failures(failures_i[1]), .detections(det_i[1]));
  cfar_size_check #(.N(16), .M(4)) u_n16 (.clk, .done(done[2]), .checks(checks_i[2]), .failures(failures_i[2]), .detections(det_i[2]));
  cfar_size_check #(.N(32), .M(4)) u_n32 (.clk, .done(done[3]), .checks(checks_i[3]), .failures(failures_i[3]), .detections(det_i[3]));

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      checks += checks_i[i] + 1;
      failures += failures_i[i];
      // every size must both detect something and leave something undetected
      if (det_i[i] == 0) failures++;
      $display("size %0d: checks=%0d failures=%0d detections=%0d", i, checks_i[i], failures_i[i], det_i[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
