// cfar_processor: run-time configurable CFAR detector built around two FIFO
// linear insertion sorters.
//
// Samples enter the lagging reference window, a sorter of N_REF cells. The
// sample that leaves it (its oldest) moves into M_GUARD guard cells, the cell
// under test (CUT) and M_GUARD more guard cells, and from there into the
// leading reference window, a second sorter of N_REF cells. Because both
// windows are kept sorted, every cycle provides at once the window means
// (Y1, Y2, from the PE accumulators) and the samples of a chosen rank
// (Y(1) at rank sel_k in the lagging window, Y(2) at rank sel_i in the leading
// window). The mode bus picks one of six detectors: CA, GO, SO use the means,
// GOSCA, GOSGO, GOSSO the ranked samples; Z is their average, maximum or
// minimum. The threshold is alpha * Z and detect = (CUT >= alpha * Z).
//
// Timing: one sample per clock with en = 1 (en = 0 holds all state). After
// rst, out_valid rises once 2*N_REF + 2*M_GUARD + 1 samples have been written,
// i.e. when the CUT and both windows hold real samples; from then on each
// written sample gives a new decision. Outputs are combinational from the
// registers, so they refer to the CUT present in that cycle, and mode, sel_k,
// sel_i and alpha act on the current output without any transition phase.
// Structure and defaults (12-bit data, 16 + 16 reference cells, 4 + 4 guard
// cells, rank 12, alpha 973/1024) follow the reference design; the en input,
// the synchronous reset, out_valid and the alpha format are this design's.
module cfar_processor
  import cfar_pkg::*;
#(
  parameter int unsigned DATA_W     = DEF_DATA_W,
  parameter int unsigned N_REF      = DEF_N_REF,     // reference cells per side (n)
  parameter int unsigned M_GUARD    = DEF_M_GUARD,   // guard cells per side (m)
  parameter int unsigned ALPHA_W    = DEF_ALPHA_W,
  parameter int unsigned ALPHA_FRAC = DEF_ALPHA_FRAC,
  parameter int unsigned RANK_W     = $clog2(N_REF + 1),
  parameter int unsigned PROD_W     = DATA_W + ALPHA_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic [DATA_W-1:0]            x_in,
  input  cfar_mode_t                   mode,
  input  logic [RANK_W-1:0]            sel_k,     // rank in the lagging window
  input  logic [RANK_W-1:0]            sel_i,     // rank in the leading window
  input  logic [ALPHA_W-1:0]           alpha,
  output logic                         out_valid,
  output logic [DATA_W-1:0]            cut,
  output logic [DATA_W-1:0]            z,
  output logic [PROD_W-ALPHA_FRAC-1:0] threshold,
  output logic                         detect
);

  localparam int unsigned P     = 2 * N_REF + 2 * M_GUARD + 1;
  localparam int unsigned FILL_W = $clog2(P + 1);

  logic [DATA_W-1:0] lag_oldest, lag_mean, lag_rank;
  logic [DATA_W-1:0] lead_oldest, lead_mean, lead_rank;
  logic [DATA_W-1:0] guard_q;
  logic [PROD_W-1:0] threshold_full;
  logic [FILL_W-1:0] fill;

  // Per-window views the processor does not use beyond the windows.
  logic [DATA_W-1:0]                 lag_sorted  [N_REF];
  logic [DATA_W-1:0]                 lead_sorted [N_REF];
  logic [N_REF-1:0]                  lag_expired, lead_expired;
  logic [DATA_W+$clog2(N_REF)-1:0]   lag_sum, lead_sum;

  reference_window #(.DATA_W(DATA_W), .N(N_REF), .RANK_W(RANK_W)) u_lagging (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .d      (x_in),
    .rank   (sel_k),
    .oldest (lag_oldest),
    .y_mean (lag_mean),
    .y_rank (lag_rank),
    .sum    (lag_sum),
    .sorted (lag_sorted),
    .expired(lag_expired)
  );

  guard_cut_shift #(.DATA_W(DATA_W), .M(M_GUARD)) u_guard (
    .clk(clk),
    .rst(rst),
    .en (en),
    .d  (lag_oldest),
    .cut(cut),
    .q  (guard_q)
  );

  reference_window #(.DATA_W(DATA_W), .N(N_REF), .RANK_W(RANK_W)) u_leading (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .d      (guard_q),
    .rank   (sel_i),
    .oldest (lead_oldest),
    .y_mean (lead_mean),
    .y_rank (lead_rank),
    .sum    (lead_sum),
    .sorted (lead_sorted),
    .expired(lead_expired)
  );

  cfar_alu #(.DATA_W(DATA_W)) u_alu (
    .mode   (mode),
    .y1_mean(lag_mean),
    .y1_rank(lag_rank),
    .y2_mean(lead_mean),
    .y2_rank(lead_rank),
    .z      (z)
  );

  threshold_detector #(
    .DATA_W    (DATA_W),
    .ALPHA_W   (ALPHA_W),
    .ALPHA_FRAC(ALPHA_FRAC),
    .PROD_W    (PROD_W)
  ) u_thresh (
    .z            (z),
    .alpha        (alpha),
    .cut          (cut),
    .threshold    (threshold_full),
    .threshold_int(threshold),
    .detect       (detect)
  );

  // Fill counter: the window is complete after P samples.
  always_ff @(posedge clk) begin
    if (rst) begin
      fill <= '0;
    end else if (en && fill != FILL_W'(P)) begin
      fill <= fill + 1'b1;
    end
  end

  assign out_valid = fill == FILL_W'(P);

endmodule
