// tb_sbc: self-checking test of one Sorting Basic Cell in isolation.
//
// The testbench plays the cell's two neighbours and the incoming sample and
// checks, for each situation of the sorting algorithm, the comparator output,
// the control flags passed to the neighbours, the offered data and the new
// X / CNT after the clock: keep (count up), shift from the left, shift from the
// right, take D at the insertion point from either side, expire, and hold with
// en = 0. Expected values are worked out by hand from the insertion rules.
module tb_sbc;
  localparam int DW = 12;
  localparam int N  = 8;
  localparam int CW = 3;

  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] d, d_from_left, d_from_right, d_left, d_right, x;
  logic [CW-1:0] cnt_from_left, cnt_from_right, cnt;
  logic p_left, p_right, cnt_flag_right, p, cnt_flag, expired;
  int checks = 0, failures = 0;

  sbc #(.DATA_W(DW), .N(N), .CNT_W(CW), .INIT_CNT(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Drive one step and check the state after the clock.
  task automatic step(logic [DW-1:0] dd, logic pl, logic pr, logic fr,
                      logic [DW-1:0] dl, logic [DW-1:0] dr,
                      logic [CW-1:0] cl, logic [CW-1:0] cr,
                      logic [DW-1:0] exp_x, logic [CW-1:0] exp_cnt, string tag);
    d = dd; p_left = pl; p_right = pr; cnt_flag_right = fr;
    d_from_left = dl; d_from_right = dr; cnt_from_left = cl; cnt_from_right = cr;
    @(posedge clk); #1;
    chk({tag, " x"}, x, exp_x);
    chk({tag, " cnt"}, cnt, exp_cnt);
  endtask

  initial begin
    d = 0; p_left = 1; p_right = 0; cnt_flag_right = 0;
    d_from_left = 0; d_from_right = 0; cnt_from_left = 0; cnt_from_right = 0;
    @(posedge clk); #1;
    rst = 0;
    chk("reset x", x, 0);
    chk("reset cnt", cnt, 5);
    en = 1;
    // X=0, D=7: p=0. Neighbours say: left p=0, expired cell to the right
    // -> shift right: take left neighbour's offer 33 and its count 2 (+1).
    d = 7; p_left = 0; p_right = 0; cnt_flag_right = 1; #1;
    chk("p low", p, 0);
    chk("cnt flag passes", cnt_flag, 1);
    chk("offer left is D", d_left, 7);
    chk("offer right is X", d_right, 0);
    step(7, 0, 0, 1, 33, 44, 2, 6, 33, 3, "shift right");
    // X=33, D=10: p=1, no expired cell to the right, left p=1, right p=1
    // -> shift left: take right neighbour's 20 with count 4 (+1).
    d = 10; p_left = 1; p_right = 1; cnt_flag_right = 0; #1;
    chk("p high", p, 1);
    chk("offer left is X", d_left, 33);
    chk("offer right is D", d_right, 10);
    step(10, 1, 1, 0, 99, 20, 1, 4, 20, 5, "shift left");
    // X=20, D=50: p=0, left p=1, expired to the right -> insertion point,
    // takes D (offered by left neighbour) and count restarts.
    step(50, 1, 0, 1, 50, 11, 1, 1, 50, 0, "insert from left");
    // X=50, D=5: p=1, right p=0, no expired to the right -> takes right offer D.
    step(5, 1, 0, 0, 77, 5, 1, 1, 5, 0, "insert from right");
    // X=5, D=5: p=0 (not greater), left p=0, no expired right -> keep, count+1.
    step(5, 0, 0, 0, 77, 66, 3, 3, 5, 1, "keep");
    // Hold with en=0.
    en = 0;
    step(9, 0, 0, 1, 88, 88, 3, 3, 5, 1, "hold");
    en = 1;
    // Count the cell up to N-1 = 7 by keeping (x=5, D=100: p=0, left p=0).
    for (int k = 2; k <= 7; k++) step(100, 0, 0, 0, 1, 1, 0, 0, 5, CW'(k), "count");
    chk("expired at N-1", expired, 1);
    // Expired cell with p=0 and left p=0 loads from the left (shift right).
    d = 100; p_left = 0; cnt_flag_right = 0; #1;
    chk("flag set by expired", cnt_flag, 1);
    step(100, 0, 0, 0, 123, 1, 6, 0, 123, 7, "expire load left");
    chk("expired again", expired, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
