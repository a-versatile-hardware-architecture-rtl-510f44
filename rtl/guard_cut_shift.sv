// guard_cut_shift: the guard cells and the cell under test (CUT).
//
// A plain shift register of 2M+1 stages between the two reference windows:
// M guard cells, the CUT in the middle, then M more guard cells. The guard
// cells keep the samples next to the CUT out of the noise estimate. Stage 0
// takes d; cut is stage M and q the last stage, which feeds the leading window.
// Timing: shifts on the rising edge when en = 1; rst (synchronous) clears all
// stages. The structure is the reference design's; the reset is this design's.
module guard_cut_shift #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned M      = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] cut,
  output logic [DATA_W-1:0] q
);

  localparam int unsigned LEN = 2 * M + 1;

  logic [DATA_W-1:0] stage [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end
  end

  assign cut = stage[M];
  assign q   = stage[LEN-1];

endmodule
