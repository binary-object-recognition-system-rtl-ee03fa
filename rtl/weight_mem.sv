// weight_mem: tri-state weight store of the bSOM.
//
// The memory is organised by bit position, not by neuron: word k holds bit k
// of every neuron (NEURONS trits, two bits each). One access therefore serves
// all neurons at once, which is what lets the initialisation, distance and
// update passes walk the 768 bit positions while treating all 40 neurons in
// parallel.
//
// Ports: one write port with a per-neuron write enable (only neurons in the
// neighbourhood are rewritten during an update), and two synchronous read
// ports: port R for the training/recognition datapath and port D for the VGA
// display. Read data appears one clock after the address. A read of the word
// being written in the same cycle returns the old contents.
//
// Holding the weights in block RAM follows the reference design; the
// bit-position organisation and the second read port (an FPGA would keep two
// copies of a simple dual-port RAM) are this design's choices.
module weight_mem #(
  parameter int unsigned NEURONS  = 40,
  parameter int unsigned VEC_BITS = 768,
  localparam int unsigned AW      = $clog2(VEC_BITS)
) (
  input  logic                   clk,
  // write port
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [NEURONS-1:0]     wmask,
  input  logic [2*NEURONS-1:0]   wdata,
  // datapath read port
  input  logic                   re_r,
  input  logic [AW-1:0]          raddr_r,
  output logic [2*NEURONS-1:0]   rdata_r,
  // display read port
  input  logic                   re_d,
  input  logic [AW-1:0]          raddr_d,
  output logic [2*NEURONS-1:0]   rdata_d
);

  logic [2*NEURONS-1:0] mem [VEC_BITS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int j = 0; j < NEURONS; j++)
        if (wmask[j]) mem[waddr][2*j +: 2] <= wdata[2*j +: 2];
    end
  end

  always_ff @(posedge clk) if (re_r) rdata_r <= mem[raddr_r];
  always_ff @(posedge clk) if (re_d) rdata_d <= mem[raddr_d];

endmodule
