// cfar_pkg: types and default sizes shared by the CFAR processor modules.
//
// The processor's run-time configuration is a small control bus made of two
// fields. sel_op picks where the two window statistics come from: 1 selects the
// window means Y1/Y2 (linear detectors CA, GO, SO), 0 selects the rank-ordered
// samples Y(1)/Y(2) (generalized order-statistic detectors GOSCA, GOSGO, GOSSO).
// sel_det picks the ALU operation that combines them into Z: average, maximum
// or minimum. Grouping the two selects into one bus, and the 1/0 meaning of
// sel_op, follow the reference architecture; the 2-bit encoding of sel_det and
// the named detector constants are this design's choice.
package cfar_pkg;

  // ALU operation (SelDet).
  typedef enum logic [1:0] {
    DET_AVG = 2'd0,   // Z = (A + B) / 2   -> CA / GOSCA
    DET_MAX = 2'd1,   // Z = max(A, B)     -> GO / GOSGO
    DET_MIN = 2'd2    // Z = min(A, B)     -> SO / GOSSO
  } sel_det_e;

  // Detector selection bus: {SelOp, SelDet}.
  typedef struct packed {
    logic     sel_op;   // 1: window means, 0: rank-ordered samples
    sel_det_e sel_det;
  } cfar_mode_t;

  // The six detectors as values of the selection bus.
  localparam cfar_mode_t MODE_CA    = '{sel_op: 1'b1, sel_det: DET_AVG};
  localparam cfar_mode_t MODE_GO    = '{sel_op: 1'b1, sel_det: DET_MAX};
  localparam cfar_mode_t MODE_SO    = '{sel_op: 1'b1, sel_det: DET_MIN};
  localparam cfar_mode_t MODE_GOSCA = '{sel_op: 1'b0, sel_det: DET_AVG};
  localparam cfar_mode_t MODE_GOSGO = '{sel_op: 1'b0, sel_det: DET_MAX};
  localparam cfar_mode_t MODE_GOSSO = '{sel_op: 1'b0, sel_det: DET_MIN};

  // Default configuration: 12-bit samples, 32 reference cells (16 per side),
  // 4 guard cells per side, rank 12 of 16 (0.75 n), alpha = 973/1024.
  localparam int unsigned DEF_DATA_W     = 12;
  localparam int unsigned DEF_N_REF      = 16;
  localparam int unsigned DEF_M_GUARD    = 4;
  localparam int unsigned DEF_ALPHA_W    = 16;
  localparam int unsigned DEF_ALPHA_FRAC = 10;
  localparam int unsigned DEF_ALPHA      = 973;
  localparam int unsigned DEF_RANK       = 12;

endpackage
