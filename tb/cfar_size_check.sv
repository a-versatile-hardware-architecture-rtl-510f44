// cfar_size_check: drives one CFAR processor of a given window size with a
// random stream and compares every valid output, for all six detectors, with a
// model that recomputes both windows from the stored input samples. Used by
// tb_cfar_sizes to run several window configurations side by side. Ranks are
// 0.75 n, alpha is 973/1024. It reports its counts on its ports when done.
module cfar_size_check
  import cfar_pkg::*;
#(
  parameter int N       = 16,
  parameter int M       = 4,
  parameter int SAMPLES = 600
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   detections
);
  localparam int DW = 12;
  localparam int P  = 2 * N + 2 * M + 1;
  localparam int RW = $clog2(N + 1);
  localparam int K  = (3 * N) / 4;

  logic rst = 1, en = 0;
  logic [DW-1:0] x_in, cut, z;
  cfar_mode_t mode;
  logic [RW-1:0] sel_k, sel_i;
  logic [15:0] alpha;
  logic out_valid, detect;
  logic [DW+16-10-1:0] threshold;
  int samples [$];
  cfar_mode_t mode_list [6] = '{MODE_CA, MODE_GO, MODE_SO, MODE_GOSCA, MODE_GOSGO, MODE_GOSSO};

  cfar_processor #(.N_REF(N), .M_GUARD(M)) dut (
    .clk, .rst, .en, .x_in, .mode, .sel_k, .sel_i, .alpha,
    .out_valid, .cut, .z, .threshold, .detect
  );

  function automatic int kth(int w [$], int k);
    w.sort();
    return w[k-1];
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  task automatic check_outputs(int t);
    int lag [$], lead [$];
    int s1 = 0, s2 = 0, a, b, zz, c;
    longint thr;
    chk("out_valid", out_valid, t >= P);
    if (t < P) return;
    for (int j = t - N; j < t; j++) lag.push_back(samples[j]);
    for (int j = t - P; j < t - N - 2*M - 1; j++) lead.push_back(samples[j]);
    c = samples[t - N - M - 1];
    foreach (lag[j]) s1 += lag[j];
    foreach (lead[j]) s2 += lead[j];
    a = mode.sel_op ? s1 / N : kth(lag, int'(sel_k));
    b = mode.sel_op ? s2 / N : kth(lead, int'(sel_i));
    case (mode.sel_det)
      DET_MAX: zz = (a > b) ? a : b;
      DET_MIN: zz = (a < b) ? a : b;
      default: zz = (a + b) / 2;
    endcase
    thr = longint'(zz) * longint'(alpha);
    chk("cut", cut, c);
    chk("z", z, zz);
    chk("detect", detect, longint'(c) * 1024 >= thr);
    if (detect) detections++;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; detections = 0;
    x_in = 0; mode = MODE_CA; sel_k = RW'(K); sel_i = RW'(K); alpha = 16'd973;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < SAMPLES; i++) begin
      int v;
      v = 200 + $urandom_range(0, 300);
      if ((i / 97) % 2 == 1) v += 1500;                 // clutter blocks
      if (i % 53 == 0) v = 4000;                        // targets
      mode = mode_list[(i / 30) % 6];
      en = 1; x_in = DW'(v);
      @(posedge clk); #1;
      en = 0;
      samples.push_back(v);
      check_outputs(samples.size());
    end
    done = 1;
  end
endmodule
