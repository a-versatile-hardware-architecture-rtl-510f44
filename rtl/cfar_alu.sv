// cfar_alu: operand selection and the ALU that forms the Z statistic.
//
// Two 2-to-1 multiplexers, both driven by mode.sel_op, choose per window
// between the window mean (sel_op = 1: Y1 from the lagging window, Y2 from the
// leading one) and the rank-ordered sample (sel_op = 0: Y(1), Y(2)). The ALU
// then combines the pair as mode.sel_det says: the average (A + B) / 2, the
// maximum or the minimum. The six combinations are the CA, GO, SO, GOSCA,
// GOSGO and GOSSO detectors. The average is computed with one extra bit and
// truncated; an unused sel_det code gives the average. Purely combinational,
// so a change of mode takes effect on the very next output.
module cfar_alu
  import cfar_pkg::*;
#(
  parameter int unsigned DATA_W = 12
) (
  input  cfar_mode_t        mode,
  input  logic [DATA_W-1:0] y1_mean,   // Y1   (lagging window mean)
  input  logic [DATA_W-1:0] y1_rank,   // Y(1) (lagging window, rank k)
  input  logic [DATA_W-1:0] y2_mean,   // Y2   (leading window mean)
  input  logic [DATA_W-1:0] y2_rank,   // Y(2) (leading window, rank i)
  output logic [DATA_W-1:0] z
);

  logic [DATA_W-1:0] a, b;
  logic [DATA_W:0]   sum;

  always_comb begin
    a   = mode.sel_op ? y1_mean : y1_rank;
    b   = mode.sel_op ? y2_mean : y2_rank;
    sum = {1'b0, a} + {1'b0, b};
    unique case (mode.sel_det)
      DET_MAX: z = (a > b) ? a : b;
      DET_MIN: z = (a < b) ? a : b;
      default: z = sum[DATA_W:1];
    endcase
  end

endmodule
