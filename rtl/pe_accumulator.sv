// pe_accumulator: running sum and mean of one reference window.
//
// Rather than adding all N window samples each cycle, the accumulator adds the
// sample entering the window (in_value) and subtracts the one leaving it
// (out_value): acc <= acc + in_value - out_value. The mean is the sum shifted
// right by log2(N), so N must be a power of two. The adder, subtracter,
// register and shifter are those of the reference design; the register width
// DATA_W + log2(N), which can hold the largest possible sum exactly, and the
// truncating shift are this design's choices.
// Timing: acc updates on the rising edge with en = 1; y is combinational from
// acc. rst (synchronous) clears the sum, matching the all-zero sorting array.
module pe_accumulator #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned N      = 16,
  parameter int unsigned LOG2N  = (N > 1) ? $clog2(N) : 0,
  parameter int unsigned ACC_W  = DATA_W + LOG2N
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] in_value,
  input  logic [DATA_W-1:0] out_value,
  output logic [ACC_W-1:0]  acc,
  output logic [DATA_W-1:0] y
);

  if ((1 << LOG2N) != N) begin : g_bad_n
    $error("pe_accumulator: N must be a power of two");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
    end else if (en) begin
      acc <= acc + ACC_W'(in_value) - ACC_W'(out_value);
    end
  end

  assign y = DATA_W'(acc >> LOG2N);

endmodule
