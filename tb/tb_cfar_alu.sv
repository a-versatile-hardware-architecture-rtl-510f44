// tb_cfar_alu: all six detector selections on random and corner operands;
// the expected Z is computed directly from the detector definitions.
module tb_cfar_alu;
  import cfar_pkg::*;
  localparam int DW = 12;
  cfar_mode_t mode;
  logic [DW-1:0] y1_mean, y1_rank, y2_mean, y2_rank, z;
  int checks = 0, failures = 0;

  cfar_alu #(.DATA_W(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_z(cfar_mode_t m, int a1, int r1, int a2, int r2);
    int a = m.sel_op ? a1 : r1;
    int b = m.sel_op ? a2 : r2;
    case (m.sel_det)
      DET_MAX: return (a > b) ? a : b;
      DET_MIN: return (a < b) ? a : b;
      default: return (a + b) / 2;
    endcase
  endfunction

  initial begin
    cfar_mode_t modes [6] = '{MODE_CA, MODE_GO, MODE_SO, MODE_GOSCA, MODE_GOSGO, MODE_GOSSO};
    for (int t = 0; t < 400; t++) begin
      if (t < 6) begin
        y1_mean = 4095; y2_mean = 4095; y1_rank = 4094; y2_rank = 4095;
      end else begin
        y1_mean = DW'($urandom); y1_rank = DW'($urandom);
        y2_mean = DW'($urandom); y2_rank = DW'($urandom);
      end
      foreach (modes[i]) begin
        int e;
        mode = modes[i];
        #1;
        e = expect_z(mode, y1_mean, y1_rank, y2_mean, y2_rank);
        checks++;
        if (int'(z) != e) begin
          failures++;
          $display("FAIL mode=%b z=%0d expected %0d", mode, z, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
