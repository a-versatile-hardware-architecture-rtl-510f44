// sorting_array: FIFO linear insertion sorter made of N Sorting Basic Cells.
//
// The array always holds the last N samples written with en = 1, sorted in
// non-increasing order: x[0] is the largest, x[N-1] the smallest. Each step
// inserts d at its sorted place and drops the oldest sample in the same clock,
// so no sorting pass is ever needed. The cells are chained as in a linear
// array: the left end behaves as a neighbour with p = 1 (an infinitely large
// value) and the right end as one with p = 0; both ends offer d as data.
//
// expired is one-hot and marks the cell holding the oldest sample, the one that
// is dropped at the next clock edge with en = 1. After rst every cell holds 0
// and cell i has life count i, so cell N-1 is the first to expire.
// Interface: x and expired are valid every cycle (registers, and a compare of
// the counter); they change on the rising edge when en = 1.
module sorting_array #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned N      = 16,
  parameter int unsigned CNT_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] x       [N],
  output logic [N-1:0]      expired
);

  logic              p        [N];
  logic              cnt_flag [N];
  logic [DATA_W-1:0] d_left   [N];
  logic [DATA_W-1:0] d_right  [N];
  logic [CNT_W-1:0]  cnt      [N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    logic              p_l, p_r, flag_r;
    logic [DATA_W-1:0] d_l, d_r;
    logic [CNT_W-1:0]  c_l, c_r;

    if (i == 0) begin : g_left_end
      assign p_l = 1'b1;
      assign d_l = d;
      assign c_l = '0;
    end else begin : g_left
      assign p_l = p[i-1];
      assign d_l = d_right[i-1];
      assign c_l = cnt[i-1];
    end

    if (i == N - 1) begin : g_right_end
      assign p_r    = 1'b0;
      assign flag_r = 1'b0;
      assign d_r    = d;
      assign c_r    = '0;
    end else begin : g_right
      assign p_r    = p[i+1];
      assign flag_r = cnt_flag[i+1];
      assign d_r    = d_left[i+1];
      assign c_r    = cnt[i+1];
    end

    sbc #(
      .DATA_W  (DATA_W),
      .N       (N),
      .CNT_W   (CNT_W),
      .INIT_CNT(i)
    ) u_sbc (
      .clk           (clk),
      .rst           (rst),
      .en            (en),
      .d             (d),
      .p_left        (p_l),
      .d_from_left   (d_l),
      .cnt_from_left (c_l),
      .p_right       (p_r),
      .cnt_flag_right(flag_r),
      .d_from_right  (d_r),
      .cnt_from_right(c_r),
      .p             (p[i]),
      .cnt_flag      (cnt_flag[i]),
      .d_left        (d_left[i]),
      .d_right       (d_right[i]),
      .x             (x[i]),
      .cnt           (cnt[i]),
      .expired       (expired[i])
    );
  end

  // Exactly one cell holds the oldest sample.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ($onehot(expired))
        else $error("sorting_array: expired is not one-hot: %b", expired);
    end
  end

endmodule
