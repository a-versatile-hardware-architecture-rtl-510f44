// tb_cfar_processor: end-to-end test of the CFAR processor at its default
// configuration (12-bit samples, 16 + 16 reference cells, 4 + 4 guard cells,
// ranks k = i = 12, alpha = 973/1024).
//
// Stimulus is a generated 500-sample range profile: a strong clutter region
// with a sharp edge, a low noise floor, isolated targets and a pair of closely
// spaced targets. Runs:
//   1. every detector in turn (the mode changes every 40 samples) with random
//      sample stalls (en = 0), rank changes and a change of alpha;
//   2. the detector-switching experiment: GOSGO (k = i) for the first 250
//      samples, then GO; and a second pass with GO throughout. From the switch
//      onwards both passes must give the same threshold and decisions, i.e.
//      the switch takes effect at once with no transition phase.
// Every valid output is compared with a model that recomputes both windows,
// the ranks, Z, the threshold and the decision from the stored input samples.
// It also checks that out_valid rises after exactly 2n + 2m + 1 samples and
// counts that each mechanism happened: each of the six detectors, stalls,
// detections and non-detections, a mode switch, a rank change, an alpha
// change, and sorter insertions on both sides of the dropped sample.
module tb_cfar_processor;
  import cfar_pkg::*;

  localparam int DW = DEF_DATA_W;
  localparam int N  = DEF_N_REF;
  localparam int M  = DEF_M_GUARD;
  localparam int P  = 2 * N + 2 * M + 1;
  localparam int PROF = 500;

  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] x_in, cut, z;
  cfar_mode_t mode;
  logic [4:0] sel_k, sel_i;
  logic [15:0] alpha;
  logic out_valid, detect;
  logic [DW+16-10-1:0] threshold;

  int checks = 0, failures = 0;
  cfar_mode_t mode_list [6] = '{MODE_CA, MODE_GO, MODE_SO, MODE_GOSCA, MODE_GOSGO, MODE_GOSSO};
  int profile [PROF];
  int samples [$];
  int n_mode [6];
  int n_stall, n_detect, n_clear, n_switch, n_rank_change, n_alpha_change;
  int n_ins_left, n_ins_right;
  int thr_run_a [PROF], thr_run_b [PROF];
  logic det_run_a [PROF], det_run_b [PROF];

  cfar_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int mode_index(cfar_mode_t m);
    return (m.sel_op ? 0 : 3) + int'(m.sel_det);
  endfunction

  // k-th smallest (1-based) of a window.
  function automatic int kth(int w [$], int k);
    w.sort();
    return w[k-1];
  endfunction

  // Check the current outputs against the model; t samples written so far.
  task automatic check_outputs(int t);
    int lag [$], lead [$];
    int s1, s2, y1, y2, r1, r2, a, b, zz, c;
    longint thr;
    chk("out_valid", out_valid, t >= P);
    if (t < P) return;
    for (int j = t - N; j < t; j++) lag.push_back(samples[j]);
    for (int j = t - 2*N - 2*M - 1; j < t - N - 2*M - 1; j++) lead.push_back(samples[j]);
    c = samples[t - N - M - 1];
    s1 = 0; s2 = 0;
    foreach (lag[j]) s1 += lag[j];
    foreach (lead[j]) s2 += lead[j];
    y1 = s1 / N; y2 = s2 / N;
    r1 = kth(lag, int'(sel_k)); r2 = kth(lead, int'(sel_i));
    a = mode.sel_op ? y1 : r1;
    b = mode.sel_op ? y2 : r2;
    case (mode.sel_det)
      DET_MAX: zz = (a > b) ? a : b;
      DET_MIN: zz = (a < b) ? a : b;
      default: zz = (a + b) / 2;
    endcase
    thr = longint'(zz) * longint'(alpha);
    chk("cut", cut, c);
    chk("z", z, zz);
    chk("threshold", threshold, thr >> 10);
    chk("detect", detect, longint'(c) * 1024 >= thr);
    n_mode[mode_index(mode)]++;
    if (detect) n_detect++; else n_clear++;
  endtask

  // Which side of the dropped sample the new one is inserted on, in the
  // lagging sorter (model view): left means the new sample ranks above it.
  task automatic count_insertion(int t, int d);
    int oldest = (t >= N) ? samples[t - N] : 0;
    if (d > oldest) n_ins_left++;
    else if (d < oldest) n_ins_right++;
  endtask

  task automatic do_reset();
    rst = 1; en = 0;
    samples.delete();
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  // Write one sample (with optional stall cycles before it) and check.
  task automatic write_sample(int d, bit allow_stall);
    int t;
    if (allow_stall && $urandom_range(0, 9) == 0) begin
      en = 0; x_in = DW'($urandom);
      @(posedge clk); #1;
      n_stall++;
      check_outputs(samples.size());
    end
    t = samples.size();
    count_insertion(samples.size(), d);
    en = 1; x_in = DW'(d);
    @(posedge clk); #1;
    en = 0;
    samples.push_back(d);
    check_outputs(t + 1);
  endtask

  initial begin
    // Range profile (amplitudes in 12-bit counts).
    for (int i = 0; i < PROF; i++) begin
      int v;
      v = 150 + $urandom_range(0, 120);                   // noise floor
      if (i < 150) v = 2600 + $urandom_range(0, 900);     // clutter region
      if (i >= 200 && i < 215) v += 900;                  // weak target
      if (i == 300 || i == 306) v = 2400;                 // close targets
      if (i >= 380 && i < 384) v = 3500;                  // strong target
      if (i >= 430 && i < 470) v += 10 * (i - 430);       // rising clutter
      profile[i] = (v > 4095) ? 4095 : v;
    end

    mode = MODE_CA; sel_k = 5'(DEF_RANK); sel_i = 5'(DEF_RANK); alpha = 16'(DEF_ALPHA);
    x_in = 0;

    // Run 1: all detectors, stalls, rank and alpha changes.
    do_reset();
    for (int i = 0; i < 2 * PROF; i++) begin
      cfar_mode_t nm;
      nm = mode_list[(i / 40) % 6];
      if (nm != mode) n_switch++;
      mode = nm;
      if (i == 600) begin sel_k = 5'd4; sel_i = 5'd14; n_rank_change++; end
      if (i == 800) begin alpha = 16'd2048; n_alpha_change++; end
      write_sample(profile[i % PROF], 1'b1);
    end

    // Run 2a: GOSGO (k = i = 12) for 250 samples, then GO.
    sel_k = 5'(DEF_RANK); sel_i = 5'(DEF_RANK); alpha = 16'(DEF_ALPHA);
    do_reset();
    for (int i = 0; i < PROF; i++) begin
      mode = (i < 250) ? MODE_GOSGO : MODE_GO;
      if (i == 250) n_switch++;
      write_sample(profile[i], 1'b0);
      thr_run_a[i] = int'(threshold); det_run_a[i] = detect;
    end
    // Run 2b: GO throughout.
    do_reset();
    for (int i = 0; i < PROF; i++) begin
      mode = MODE_GO;
      write_sample(profile[i], 1'b0);
      thr_run_b[i] = int'(threshold); det_run_b[i] = detect;
    end
    for (int i = 250; i < PROF; i++) begin
      chk("switch: threshold equal after switch", thr_run_a[i], thr_run_b[i]);
      chk("switch: decision equal after switch", det_run_a[i], det_run_b[i]);
    end
    begin
      int differ = 0;
      for (int i = P; i < 250; i++) if (thr_run_a[i] != thr_run_b[i]) differ++;
      chk("switch: runs differ before switch", differ > 0, 1);
    end

    // Mechanism coverage.
    foreach (n_mode[j]) chk($sformatf("detector %0d used", j), n_mode[j] > 0, 1);
    chk("stalls seen", n_stall > 0, 1);
    chk("detections seen", n_detect > 0, 1);
    chk("non-detections seen", n_clear > 0, 1);
    chk("mode switches seen", n_switch > 0, 1);
    chk("rank change seen", n_rank_change > 0, 1);
    chk("alpha change seen", n_alpha_change > 0, 1);
    chk("insertions left of dropped sample", n_ins_left > 0, 1);
    chk("insertions right of dropped sample", n_ins_right > 0, 1);
    $display("modes CA=%0d GO=%0d SO=%0d GOSCA=%0d GOSGO=%0d GOSSO=%0d", n_mode[0], n_mode[1],
             n_mode[2], n_mode[3], n_mode[4], n_mode[5]);
    $display("stalls=%0d detections=%0d clear=%0d switches=%0d ins_left=%0d ins_right=%0d",
             n_stall, n_detect, n_clear, n_switch, n_ins_left, n_ins_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
