// sbc: Sorting Basic Cell, one stage of the FIFO linear insertion sorter.
//
// The cell holds one sample X and its life counter CNT (the number of samples
// that arrived after it). Every cell sees the incoming sample D and the
// comparator gives p = (X > D). In a sorting array the cells hold the samples
// in non-increasing order from left to right, so p reads 1..1 0..0 along the
// array and the 1->0 edge is where D belongs. Exactly one cell holds the oldest
// sample (CNT = N-1, output "expired"); it is dropped and the cells between the
// hole and the insertion point move one place towards the hole.
//
// The control follows the four equations of the reference design:
//   load  = (p ^ cnt_right) | expired      cnt_right: an expired cell lies right
//   LR    = p & load                       1: take from the right, 0: from left
//   reset = load & ((p_left & ~p) | (p & ~p_right))   this cell receives D
//   cnt   = cnt_right | expired            flag passed to the left neighbour
// Each cell offers its neighbours either its own X or D: towards the left it
// sends D when p = 0 (d_left), towards the right it sends D when p = 1
// (d_right). The X and CNT input multiplexers select the right neighbour's
// offer when LR = 1 and the left neighbour's when LR = 0.
//
// Counting: a loaded cell takes the neighbour's CNT plus one, a cell that keeps
// its sample counts up by one, and the cell that receives D restarts at 0; so
// after every step the counts are again 0..N-1 and one cell is expired. How the
// counter ages a moved sample is this design's choice.
//
// Timing: p, the flags, the offers and expired are combinational from X, CNT
// and D; X and CNT change on the rising clock edge when en = 1. rst is
// synchronous and sets X = 0 and CNT = INIT_CNT (the cell's position).
module sbc #(
  parameter int unsigned DATA_W   = 12,
  parameter int unsigned N        = 16,             // cells in the array (life span)
  parameter int unsigned CNT_W    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned INIT_CNT = 0               // position in the array
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,             // incoming sample (broadcast)
  // from the left neighbour (i-1)
  input  logic              p_left,
  input  logic [DATA_W-1:0] d_from_left,
  input  logic [CNT_W-1:0]  cnt_from_left,
  // from the right neighbour (i+1)
  input  logic              p_right,
  input  logic              cnt_flag_right,
  input  logic [DATA_W-1:0] d_from_right,
  input  logic [CNT_W-1:0]  cnt_from_right,
  // to the neighbours
  output logic              p,
  output logic              cnt_flag,
  output logic [DATA_W-1:0] d_left,
  output logic [DATA_W-1:0] d_right,
  // cell state
  output logic [DATA_W-1:0] x,
  output logic [CNT_W-1:0]  cnt,
  output logic              expired
);

  logic load, lr, rst_cnt;

  always_comb begin
    p        = x > d;
    expired  = cnt == CNT_W'(N - 1);
    load     = (p ^ cnt_flag_right) | expired;
    lr       = p & load;
    rst_cnt  = load & ((p_left & ~p) | (p & ~p_right));
    cnt_flag = cnt_flag_right | expired;
    d_left   = p ? x : d;
    d_right  = p ? d : x;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x   <= '0;
      cnt <= CNT_W'(INIT_CNT);
    end else if (en) begin
      if (load) begin
        x <= lr ? d_from_right : d_from_left;
      end
      if (rst_cnt) begin
        cnt <= '0;
      end else if (load) begin
        cnt <= (lr ? cnt_from_right : cnt_from_left) + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
