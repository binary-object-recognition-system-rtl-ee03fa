// bsom_top: FPGA binary self-organising map (bSOM) for object identification.
//
// The engine holds NEURONS tri-state weight vectors of VEC_BITS trits
// (40 x 768, each vector a 32x24 binary image). Binary signatures arrive
// one bit per clock on the serial input. Per signature it computes the
// Hamming distance to every neuron in parallel (don't-care trits never
// count), finds the nearest neuron in a pipelined comparator tree, and then,
// according to `mode`:
//   MODE_TRAIN  moves the winner and its neighbours one trit step towards
//               the input, with a neighbourhood that shrinks from 4 to 1 as
//               the iteration count approaches `num_iters`;
//   MODE_LABEL  counts a win of the winner for the signature's label;
//   MODE_RECOG  reports the winner's label, or unknown when the best
//               distance is above `unknown_thresh`.
// After reset the map randomises its weights by itself (VEC_BITS clocks);
// `cmd_init` repeats that and clears the label counters and iteration count;
// `cmd_finalize` gives each neuron its most frequent label.
// The weights are shown continuously on an 800x600 60 Hz VGA output.
//
// Blocks: pattern_input -> bsom_ctrl -> weight_mem -> hamming_array ->
// wta_tree -> neighbourhood_update -> weight_mem; weight_init writes the
// memory at start-up; node_labeller keeps the labels; vga_display reads the
// memory's second read port. All blocks run on one clock (40 MHz in the
// reference design) with an active-low asynchronous reset.
// Results appear as a one-clock `res_valid` pulse; `busy` is high while a
// command or a pattern is in progress.
module bsom_top #(
  parameter int unsigned NEURONS     = 40,
  parameter int unsigned VEC_BITS    = 768,
  parameter int unsigned DIST_W      = 10,
  parameter int unsigned TREE_LEAVES = 100,
  parameter int unsigned MAX_NEIGH   = 4,
  parameter int unsigned NUM_LABELS  = 9,
  parameter int unsigned IMG_W       = 32,
  localparam int unsigned IMG_H      = VEC_BITS / IMG_W,
  localparam int unsigned AW         = $clog2(VEC_BITS),
  localparam int unsigned IW         = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned LABEL_W    = bsom_pkg::LABEL_W,
  localparam int unsigned SW         = $clog2(MAX_NEIGH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host commands and settings
  input  logic                 cmd_init,
  input  logic                 cmd_finalize,
  input  bsom_pkg::mode_e      mode,
  input  logic [31:0]          num_iters,
  input  logic [DIST_W-1:0]    unknown_thresh,
  output logic                 busy,
  output logic [31:0]          iter,
  output logic [SW-1:0]        nsize,
  // serial signature input
  input  logic                 in_valid,
  input  logic                 in_bit,
  input  logic [LABEL_W-1:0]   in_label,
  output logic                 in_ready,
  // result of each processed signature
  output logic                 res_valid,
  output bsom_pkg::mode_e      res_mode,
  output logic [IW-1:0]        res_winner,
  output logic [DIST_W-1:0]    res_dist,
  output logic [LABEL_W-1:0]   res_label,
  output logic                 res_unknown,
  // VGA
  output logic                 vga_hsync,
  output logic                 vga_vsync,
  output logic                 vga_de,
  output logic [3:0]           vga_r,
  output logic [3:0]           vga_g,
  output logic [3:0]           vga_b,
  output logic                 vga_frame_start
);

  initial assert (IMG_W * IMG_H == VEC_BITS) else $fatal(1, "bsom_top: VEC_BITS must be IMG_W * rows");

  // pattern input
  logic                vec_valid, vec_take;
  logic [VEC_BITS-1:0] vec;
  logic [LABEL_W-1:0]  vec_label;

  // weight memory
  logic                 mem_we, mem_re_r, mem_re_d;
  logic [AW-1:0]        mem_waddr, mem_raddr_r, mem_raddr_d;
  logic [NEURONS-1:0]   mem_wmask;
  logic [2*NEURONS-1:0] mem_wdata, mem_rdata_r, mem_rdata_d;

  // initialisation
  logic                 init_start, init_busy, init_done, init_we;
  logic [AW-1:0]        init_waddr;
  logic [NEURONS-1:0]   init_wmask;
  logic [2*NEURONS-1:0] init_wdata;

  // datapath
  logic                 ham_clr, ham_en, x_bit;
  logic [DIST_W-1:0]    ham_dist [NEURONS];
  logic                 wta_start, wta_valid;
  logic [IW-1:0]        wta_idx, winner;
  logic [DIST_W-1:0]    wta_dist;
  logic                 iter_clr, iter_inc, upd_we;
  logic [AW-1:0]        upd_waddr;
  logic [NEURONS-1:0]   upd_wmask;
  logic [2*NEURONS-1:0] upd_wdata;

  // labeller
  logic                 lab_clr_start, lab_fin_start, lab_busy, lab_done, lab_cnt_en;
  logic [IW-1:0]        lab_cnt_neuron, lab_rd_neuron;
  logic [LABEL_W-1:0]   lab_cnt_label, lab_rd_label;

  pattern_input #(.VEC_BITS(VEC_BITS)) u_input (
    .clk, .rst_n, .in_valid, .in_bit, .in_label, .in_ready,
    .vec_valid, .vec, .vec_label, .vec_take);

  weight_init #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS)) u_init (
    .clk, .rst_n, .start(init_start), .busy(init_busy), .done(init_done),
    .we(init_we), .waddr(init_waddr), .wmask(init_wmask), .wdata(init_wdata));

  // The initialiser owns the write port while it runs; otherwise the update.
  always_comb begin
    if (init_busy) begin
      mem_we    = init_we;
      mem_waddr = init_waddr;
      mem_wmask = init_wmask;
      mem_wdata = init_wdata;
    end else begin
      mem_we    = upd_we;
      mem_waddr = upd_waddr;
      mem_wmask = upd_wmask;
      mem_wdata = upd_wdata;
    end
  end

  weight_mem #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wmask(mem_wmask), .wdata(mem_wdata),
    .re_r(mem_re_r), .raddr_r(mem_raddr_r), .rdata_r(mem_rdata_r),
    .re_d(mem_re_d), .raddr_d(mem_raddr_d), .rdata_d(mem_rdata_d));

  hamming_array #(.NEURONS(NEURONS), .DIST_W(DIST_W)) u_ham (
    .clk, .rst_n, .clr(ham_clr), .en(ham_en), .x(x_bit), .w(mem_rdata_r), .hdist(ham_dist));

  wta_tree #(.NEURONS(NEURONS), .DIST_W(DIST_W), .TREE_LEAVES(TREE_LEAVES)) u_wta (
    .clk, .rst_n, .in_valid(wta_start), .hdist(ham_dist),
    .out_valid(wta_valid), .win_idx(wta_idx), .win_dist(wta_dist));

  neighbourhood_update #(.NEURONS(NEURONS), .MAX_NEIGH(MAX_NEIGH)) u_nbh (
    .clk, .rst_n, .iter_clr, .iter_inc, .num_iters, .iter, .nsize,
    .winner, .wmask(upd_wmask), .x(x_bit), .w_in(mem_rdata_r), .w_out(upd_wdata));

  node_labeller #(.NEURONS(NEURONS), .NUM_LABELS(NUM_LABELS)) u_lab (
    .clk, .rst_n, .clr_start(lab_clr_start), .fin_start(lab_fin_start),
    .busy(lab_busy), .done(lab_done), .cnt_en(lab_cnt_en), .cnt_neuron(lab_cnt_neuron),
    .cnt_label(lab_cnt_label), .rd_neuron(lab_rd_neuron), .rd_label(lab_rd_label));

  bsom_ctrl #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS), .DIST_W(DIST_W)) u_ctrl (
    .clk, .rst_n, .cmd_init, .cmd_finalize, .mode, .unknown_thresh, .busy,
    .vec_valid, .vec, .vec_label, .vec_take,
    .init_start, .init_done,
    .lab_clr_start, .lab_fin_start, .lab_busy, .lab_done, .lab_cnt_en,
    .lab_cnt_neuron, .lab_cnt_label, .lab_rd_neuron, .lab_rd_label,
    .mem_re(mem_re_r), .mem_raddr(mem_raddr_r), .upd_we, .upd_waddr,
    .ham_clr, .ham_en, .x_bit,
    .wta_start, .wta_valid, .wta_idx, .wta_dist,
    .iter_clr, .iter_inc, .winner,
    .res_valid, .res_mode, .res_winner, .res_dist, .res_label, .res_unknown);

  vga_display #(.NEURONS(NEURONS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_vga (
    .clk, .rst_n, .mem_re(mem_re_d), .mem_raddr(mem_raddr_d), .mem_rdata(mem_rdata_d),
    .hsync(vga_hsync), .vsync(vga_vsync), .de(vga_de),
    .red(vga_r), .green(vga_g), .blue(vga_b), .frame_start(vga_frame_start));

endmodule
