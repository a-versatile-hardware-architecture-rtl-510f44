// tb_priority_decoder: checks SelOldest for every one-hot input, for an
// all-zero input and for random multi-hot inputs (lowest index wins).
module tb_priority_decoder;
  localparam int N = 16;
  logic [N-1:0] expired;
  logic [3:0]   sel;
  logic         any;
  int checks = 0, failures = 0;

  priority_decoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [N-1:0] v);
    int exp_sel = 0;
    logic exp_any = 0;
    expired = v;
    #1;
    for (int i = N - 1; i >= 0; i--) if (v[i]) begin exp_sel = i; exp_any = 1; end
    checks++;
    if (sel !== 4'(exp_sel) || any !== exp_any) begin
      failures++;
      $display("FAIL in=%b sel=%0d any=%b expected %0d %b", v, sel, any, exp_sel, exp_any);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) chk(N'(1) << i);
    chk('0);
    for (int t = 0; t < 200; t++) chk(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
