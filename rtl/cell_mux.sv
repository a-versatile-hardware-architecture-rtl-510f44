// cell_mux: N-input multiplexer over the cells of a sorting array.
//
// Returns x[sel]. The processor uses one per window to read the sample at a
// chosen rank (Sel-k / Sel-i) and one to read the oldest sample (SelOldest).
// A sel of N or more, possible only when N is not a power of two, returns 0.
// Purely combinational.
module cell_mux #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned N      = 16,
  parameter int unsigned SEL_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [DATA_W-1:0] x [N],
  input  logic [SEL_W-1:0]  sel,
  output logic [DATA_W-1:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) begin
      if (sel == SEL_W'(i)) y = x[i];
    end
  end

endmodule
