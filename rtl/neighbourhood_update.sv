// neighbourhood_update: neighbourhood selection and tri-state weight update.
//
// Schedule. The block counts training iterations (one per trained pattern,
// `iter_inc`; cleared by `iter_clr`). With `num_iters` the planned total, the
// neighbourhood size starts at MAX_NEIGH and falls by one each time another
// 1/MAX_NEIGH of the iterations has passed:
//   nsize = MAX_NEIGH - floor(iter * MAX_NEIGH / num_iters), at least 1.
// For MAX_NEIGH = 4 and 100 iterations this gives 4 for iterations 0-24,
// 3 for 25-49, 2 for 50-74 and 1 for 75-99, which is the reference schedule.
//
// Neighbourhood. Neurons form a one-dimensional chain by index. Neuron j
// is in the neighbourhood when |j - winner| < nsize, so size 1 updates only
// the winner and size 4 the winner and three neurons on each side. The
// chain topology and this reading of "size" are this design's choices.
//
// Update rule. For each bit position, `w_in` is the stored word and `x` the
// input bit. Every trit of a neuron in the neighbourhood takes one step
// towards x: equal stays, don't-care becomes x, the opposite value becomes
// don't-care. Neurons outside keep their trits and their write enable
// (`wmask`) is low. The rule is this design's own simple tri-state rule; the
// reference only says the winner and its neighbours are updated.
// The mask and new word are combinational; only the counter is clocked.
module neighbourhood_update #(
  parameter int unsigned NEURONS   = 40,
  parameter int unsigned MAX_NEIGH = 4,
  localparam int unsigned IW       = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned SW       = $clog2(MAX_NEIGH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 iter_clr,
  input  logic                 iter_inc,
  input  logic [31:0]          num_iters,
  output logic [31:0]          iter,
  output logic [SW-1:0]        nsize,
  input  logic [IW-1:0]        winner,
  output logic [NEURONS-1:0]   wmask,
  input  logic                 x,
  input  logic [2*NEURONS-1:0] w_in,
  output logic [2*NEURONS-1:0] w_out
);
  import bsom_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     iter <= '0;
    else if (iter_clr)              iter <= '0;
    else if (iter_inc && iter != '1) iter <= iter + 1'b1;
  end

  always_comb begin
    logic [63:0] scaled;
    int unsigned steps;
    scaled = 64'(iter) * 64'(MAX_NEIGH);
    steps  = 0;
    for (int unsigned q = 1; q < MAX_NEIGH; q++)
      if (scaled >= 64'(q) * 64'(num_iters)) steps++;
    nsize = SW'(MAX_NEIGH - steps);
  end

  always_comb begin
    for (int j = 0; j < NEURONS; j++) begin
      int diff;
      diff = (j > int'(winner)) ? j - int'(winner) : int'(winner) - j;
      wmask[j] = (diff < int'(nsize));
      w_out[2*j +: 2] = wmask[j] ? trit_step(w_in[2*j +: 2], x) : w_in[2*j +: 2];
    end
  end

endmodule
