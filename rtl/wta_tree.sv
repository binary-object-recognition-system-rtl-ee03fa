// wta_tree: winner-take-all unit, a pipelined tree of minimum comparators.
//
// The distances of all neurons enter as leaves of a binary tree. Each tree
// level is one clock: every comparator takes a pair of (distance, index)
// candidates and registers the one with the smaller distance (the lower
// index on a tie); an odd candidate out is carried to the next level
// unchanged. The tree is built for TREE_LEAVES = 100 leaves, the largest
// map size the reference design was tried with: its first level has 50
// comparators and it takes seven levels (50, 25, 13, 7, 4, 2, 1), so the
// winner is known exactly seven clocks after `in_valid`, as the reference
// design states for its 40-neuron map. Leaves above NEURONS are tied off as
// empty and never win; synthesis removes their comparators.
//
// A new set of distances may enter every clock. Outputs: out_valid, the
// winning neuron index and its (minimum) distance.
module wta_tree #(
  parameter int unsigned NEURONS     = 40,
  parameter int unsigned DIST_W      = 10,
  parameter int unsigned TREE_LEAVES = 100,
  localparam int unsigned LEVELS     = $clog2(TREE_LEAVES),
  localparam int unsigned IW         = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DIST_W-1:0] hdist [NEURONS],
  output logic              out_valid,
  output logic [IW-1:0]     win_idx,
  output logic [DIST_W-1:0] win_dist
);

  typedef struct packed {
    logic              used;
    logic [DIST_W-1:0] d;
    logic [IW-1:0]     idx;
  } cand_t;

  // Number of candidates left after level l.
  function automatic int unsigned level_count(int unsigned l);
    int unsigned n;
    n = TREE_LEAVES;
    for (int unsigned i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  function automatic cand_t pick_min(cand_t a, cand_t b);
    if (!b.used) return a;
    if (!a.used) return b;
    return (a.d <= b.d) ? a : b;
  endfunction

  initial assert (TREE_LEAVES >= NEURONS && TREE_LEAVES >= 2)
    else $fatal(1, "wta_tree: TREE_LEAVES must cover NEURONS");

  logic [LEVELS:0] vpipe;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned N = level_count(l);
    cand_t c [N];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < N; i++) begin : g_i
        if (i < NEURONS) begin : g_used
          assign c[i] = '{used: 1'b1, d: hdist[i], idx: IW'(i)};
        end else begin : g_empty
          assign c[i] = '{used: 1'b0, d: '1, idx: '0};
        end
      end
    end else begin : g_cmp
      localparam int unsigned NP = level_count(l - 1);
      for (genvar i = 0; i < N; i++) begin : g_i
        if (2 * i + 1 < NP) begin : g_pair
          always_ff @(posedge clk) c[i] <= pick_min(g_lvl[l-1].c[2*i], g_lvl[l-1].c[2*i+1]);
        end else begin : g_pass
          always_ff @(posedge clk) c[i] <= g_lvl[l-1].c[2*i];
        end
      end
    end
  end

  assign vpipe[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe[LEVELS:1] <= '0;
    else        vpipe[LEVELS:1] <= vpipe[LEVELS-1:0];
  end

  assign out_valid = vpipe[LEVELS];
  assign win_idx   = g_lvl[LEVELS].c[0].idx;
  assign win_dist  = g_lvl[LEVELS].c[0].d;

endmodule
