// reference_window: one side (lagging or leading) of the CFAR reference window.
//
// It keeps the last N samples written to it in a FIFO linear insertion sorter
// and derives everything the detectors need from that one structure:
//   * oldest - the sample that leaves the window at the next step, read through
//              a cell multiplexer steered by the priority decoder of the
//              expired bus (SelOldest). In the processor it feeds the guard
//              cells, so the sorter doubles as the window's delay line.
//   * y_mean - the window mean from the PE accumulator (in: d, out: oldest).
//   * y_rank - the sample of ascending rank `rank` (1 = smallest, N = largest),
//              read through a second cell multiplexer. The sorter holds the
//              samples largest first, so rank k is cell N-k.
// Timing: all outputs are combinational from registers; the window advances
// on the rising edge when en = 1. The rank numbering from 1 (smallest) is this
// design's choice; ranks outside 1..N are flagged by an assertion.
module reference_window #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned N      = 16,
  parameter int unsigned SEL_W  = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RANK_W = $clog2(N + 1),
  parameter int unsigned LOG2N  = (N > 1) ? $clog2(N) : 0,
  parameter int unsigned ACC_W  = DATA_W + LOG2N
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,
  input  logic [RANK_W-1:0] rank,
  output logic [DATA_W-1:0] oldest,
  output logic [DATA_W-1:0] y_mean,
  output logic [DATA_W-1:0] y_rank,
  output logic [ACC_W-1:0]  sum,
  output logic [DATA_W-1:0] sorted  [N],
  output logic [N-1:0]      expired
);

  logic [SEL_W-1:0] sel_oldest;
  logic [SEL_W-1:0] sel_rank;
  logic             expired_any;

  sorting_array #(.DATA_W(DATA_W), .N(N)) u_sorter (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .d      (d),
    .x      (sorted),
    .expired(expired)
  );

  priority_decoder #(.N(N), .SEL_W(SEL_W)) u_prio (
    .expired(expired),
    .sel    (sel_oldest),
    .any    (expired_any)
  );

  cell_mux #(.DATA_W(DATA_W), .N(N), .SEL_W(SEL_W)) u_oldest_mux (
    .x  (sorted),
    .sel(sel_oldest),
    .y  (oldest)
  );

  assign sel_rank = SEL_W'(N - rank);

  cell_mux #(.DATA_W(DATA_W), .N(N), .SEL_W(SEL_W)) u_rank_mux (
    .x  (sorted),
    .sel(sel_rank),
    .y  (y_rank)
  );

  pe_accumulator #(.DATA_W(DATA_W), .N(N), .LOG2N(LOG2N), .ACC_W(ACC_W)) u_acc (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .in_value (d),
    .out_value(oldest),
    .acc      (sum),
    .y        (y_mean)
  );

  always_ff @(posedge clk) begin
    if (!rst && en) begin
      assert (expired_any) else $error("reference_window: no expired cell");
      assert (rank >= 1 && rank <= RANK_W'(N))
        else $error("reference_window: rank %0d outside 1..%0d", rank, N);
    end
  end

endmodule
