// hamming_array: bit-serial Hamming distance of one input against all neurons.
//
// Every clock with `en` high presents one bit position: the input bit `x`
// and the word `w` holding that bit of all NEURONS weights. Each neuron's
// counter adds 1 when its weight trit is 0 or 1 and differs from x; a
// don't-care (#) trit adds nothing, so a neuron made only of #'s is at
// distance 0 from every input. After VEC_BITS enabled clocks the counters
// hold the full distances (768 clocks for the reference size, all neurons in
// parallel), as in the reference design.
//
// `clr` zeroes every counter in one clock and takes priority over `en`.
// DIST_W = 10 bits covers 768; counters saturate instead of wrapping if a
// smaller width is chosen.
module hamming_array #(
  parameter int unsigned NEURONS = 40,
  parameter int unsigned DIST_W  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic                 x,
  input  logic [2*NEURONS-1:0] w,
  output logic [DIST_W-1:0]    hdist [NEURONS]
);
  import bsom_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NEURONS; j++) hdist[j] <= '0;
    end else if (clr) begin
      for (int j = 0; j < NEURONS; j++) hdist[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < NEURONS; j++)
        if (trit_mismatch(w[2*j +: 2], x) && (hdist[j] != '1))
          hdist[j] <= hdist[j] + 1'b1;
    end
  end

endmodule
