// weight_init: random initialisation of all bSOM weights.
//
// Started by a one-cycle `start` pulse, it writes one memory word per clock,
// bit position 0 first, for exactly VEC_BITS cycles. Each word gives every
// neuron a fresh random trit, so all neurons are initialised in parallel and
// the whole map is ready VEC_BITS cycles after the start (768 for the
// reference size), as in the reference design.
//
// Randomness comes from a 127-bit LFSR (x^127 + x + 1, maximal length) that
// is advanced 127 steps per clock, so every word uses a fully new state.
// Three LFSR bits make one trit: if the first two are both 1 the trit is
// don't-care (probability 1/4), otherwise the third bit gives 0 or 1. The
// generator and these probabilities are this design's choices; the reference
// only says the initial weights are random.
//
// Interface: `busy` is high while writing; `done` pulses for one cycle after
// the last word. The write outputs connect to weight_mem's write port.
module weight_init #(
  parameter int unsigned NEURONS  = 40,
  parameter int unsigned VEC_BITS = 768,
  parameter logic [126:0] SEED    = 127'h2A5F_0C3D_9B71_E648_1D2C_3B4A_5968_7F01,
  localparam int unsigned AW      = $clog2(VEC_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 we,
  output logic [AW-1:0]        waddr,
  output logic [NEURONS-1:0]   wmask,
  output logic [2*NEURONS-1:0] wdata
);
  import bsom_pkg::*;

  localparam int unsigned LFSR_W = 127;
  localparam int unsigned RND_BITS = 3 * NEURONS;
  localparam int unsigned STEPS_PER_CLK = LFSR_W;

  logic [LFSR_W-1:0] lfsr_q;
  logic [AW-1:0]     addr_q;

  // Advance the Fibonacci LFSR n steps: new bit = s[126] ^ s[0], shifted in at bit 0.
  function automatic logic [LFSR_W-1:0] lfsr_adv(logic [LFSR_W-1:0] s, int unsigned n);
    logic [LFSR_W-1:0] t;
    t = s;
    for (int unsigned i = 0; i < n; i++) t = {t[LFSR_W-2:0], t[LFSR_W-1] ^ t[0]};
    return t;
  endfunction

  // Random bits for the current word: the first 3*NEURONS bits of the state,
  // reused cyclically if the map is wider than the LFSR.
  logic [RND_BITS-1:0] rnd;
  always_comb
    for (int unsigned b = 0; b < RND_BITS; b++) rnd[b] = lfsr_q[b % LFSR_W];

  always_comb begin
    for (int unsigned j = 0; j < NEURONS; j++) begin
      if (rnd[3*j] && rnd[3*j+1]) wdata[2*j +: 2] = TRIT_DC;
      else                        wdata[2*j +: 2] = {1'b0, rnd[3*j+2]};
    end
  end

  assign we    = busy;
  assign waddr = addr_q;
  assign wmask = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      addr_q <= '0;
      lfsr_q <= SEED;
    end else begin
      done <= 1'b0;
      if (busy) begin
        lfsr_q <= lfsr_adv(lfsr_q, STEPS_PER_CLK);
        if (addr_q == AW'(VEC_BITS - 1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          addr_q <= '0;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end else if (start) begin
        busy   <= 1'b1;
        addr_q <= '0;
      end
    end
  end

endmodule
