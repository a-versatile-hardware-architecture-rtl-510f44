// priority_decoder: turns the expired bus of a sorting array into SelOldest.
//
// Input is the expired flag of each cell; normally exactly one is set. The
// output sel is the index of the lowest-numbered set flag, and any tells
// whether a flag is set at all (sel is 0 when none is). The reference design
// names this block and its inputs and output; giving the lowest index priority
// is this design's choice, and only matters if more than one flag were set.
// Purely combinational.
module priority_decoder #(
  parameter int unsigned N     = 16,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     expired,
  output logic [SEL_W-1:0] sel,
  output logic             any
);

  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (expired[i]) begin
        sel = SEL_W'(i);
        any = 1'b1;
      end
    end
  end

endmodule
