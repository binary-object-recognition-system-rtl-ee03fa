// bsom_ctrl: sequencer of the bSOM engine.
//
// One pattern is handled at a time. Leaving reset it first initialises the
// map by itself, as the reference design does at start-up. From idle it then
// reacts, in this priority, to `cmd_init` (random weight initialisation,
// clearing of the label counters and of the iteration count; used to restart
// training), `cmd_finalize` (node
// labelling pass) and a complete input vector (`vec_valid`), which it copies
// into its own rotating register and processes according to `mode`:
//
//   DIST    VEC_BITS reads of the weight memory, one bit position per clock;
//           the Hamming array accumulates as the data returns (+1 clock).
//   WTA     the distances enter the WTA tree; the winner returns after the
//           tree latency (7 clocks in the reference size).
//   UPDATE  (train) VEC_BITS read-modify-write clocks: each returned word is
//           passed through the neighbourhood update and written back one
//           clock after it was read; then the iteration count advances.
//   COUNT   (label) one clock to count the win for the pattern's label.
//   result  every mode ends with `res_valid` for one clock, giving winner,
//           distance, the winner's current label and the unknown flag
//           (best distance above `unknown_thresh`, or unlabelled winner).
//
// A training pattern takes about 2*VEC_BITS + 12 clocks (1548 for 768 bits),
// under the 1600 clocks per pattern that 25,000 patterns per second at 40 MHz
// allow; recognition takes VEC_BITS + 11. The input vector rotates by one
// bit per accumulated or updated word, so it is back in place after each
// pass. The state split and the handshakes are this design's choices.
module bsom_ctrl #(
  parameter int unsigned NEURONS  = 40,
  parameter int unsigned VEC_BITS = 768,
  parameter int unsigned DIST_W   = 10,
  localparam int unsigned AW      = $clog2(VEC_BITS),
  localparam int unsigned IW      = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned LABEL_W = bsom_pkg::LABEL_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host commands and settings
  input  logic                  cmd_init,
  input  logic                  cmd_finalize,
  input  bsom_pkg::mode_e       mode,
  input  logic [DIST_W-1:0]     unknown_thresh,
  output logic                  busy,
  // pattern input
  input  logic                  vec_valid,
  input  logic [VEC_BITS-1:0]   vec,
  input  logic [LABEL_W-1:0]    vec_label,
  output logic                  vec_take,
  // weight initialisation
  output logic                  init_start,
  input  logic                  init_done,
  // node labeller
  output logic                  lab_clr_start,
  output logic                  lab_fin_start,
  input  logic                  lab_busy,
  input  logic                  lab_done,
  output logic                  lab_cnt_en,
  output logic [IW-1:0]         lab_cnt_neuron,
  output logic [LABEL_W-1:0]    lab_cnt_label,
  output logic [IW-1:0]         lab_rd_neuron,
  input  logic [LABEL_W-1:0]    lab_rd_label,
  // weight memory, datapath port
  output logic                  mem_re,
  output logic [AW-1:0]         mem_raddr,
  output logic                  upd_we,
  output logic [AW-1:0]         upd_waddr,
  // Hamming array
  output logic                  ham_clr,
  output logic                  ham_en,
  output logic                  x_bit,
  // WTA tree
  output logic                  wta_start,
  input  logic                  wta_valid,
  input  logic [IW-1:0]         wta_idx,
  input  logic [DIST_W-1:0]     wta_dist,
  // neighbourhood update
  output logic                  iter_clr,
  output logic                  iter_inc,
  output logic [IW-1:0]         winner,
  // results
  output logic                  res_valid,
  output bsom_pkg::mode_e       res_mode,
  output logic [IW-1:0]         res_winner,
  output logic [DIST_W-1:0]     res_dist,
  output logic [LABEL_W-1:0]    res_label,
  output logic                  res_unknown
);
  import bsom_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_INIT_WAIT, S_FINAL, S_DIST, S_DIST_DRAIN, S_WTA,
    S_WTA_WAIT, S_UPDATE, S_UPD_DRAIN, S_COUNT, S_RESULT
  } state_e;

  state_e              state_q;
  mode_e               mode_q;
  logic [VEC_BITS-1:0] xvec_q;
  logic [LABEL_W-1:0]  label_q;
  logic [AW-1:0]       addr_q;      // next address to read
  logic                rvalid_q;    // read data for raddr_d_q returns this cycle
  logic [AW-1:0]       raddr_d_q;
  logic [IW-1:0]       win_q;
  logic [DIST_W-1:0]   wdist_q;
  logic                boot_q;      // start-up initialisation still to do

  wire logic last_addr = (addr_q == AW'(VEC_BITS - 1));
  wire logic issuing   = (state_q == S_DIST) || (state_q == S_UPDATE);

  assign busy          = (state_q != S_IDLE);
  wire logic do_init   = boot_q || cmd_init;
  assign vec_take      = (state_q == S_IDLE) && !do_init && !cmd_finalize && vec_valid;
  assign init_start    = (state_q == S_IDLE) && do_init;
  assign lab_clr_start = init_start;
  assign iter_clr      = init_start;
  assign lab_fin_start = (state_q == S_IDLE) && !do_init && cmd_finalize;

  assign mem_re    = issuing;
  assign mem_raddr = addr_q;
  assign x_bit     = xvec_q[0];
  assign ham_clr   = vec_take;
  assign ham_en    = rvalid_q && (state_q == S_DIST || state_q == S_DIST_DRAIN);
  assign upd_we    = rvalid_q && (state_q == S_UPDATE || state_q == S_UPD_DRAIN);
  assign upd_waddr = raddr_d_q;
  assign wta_start = (state_q == S_WTA);
  assign winner    = win_q;
  assign iter_inc  = (state_q == S_UPD_DRAIN);

  assign lab_cnt_en     = (state_q == S_COUNT);
  assign lab_cnt_neuron = win_q;
  assign lab_cnt_label  = label_q;
  assign lab_rd_neuron  = win_q;

  assign res_valid   = (state_q == S_RESULT);
  assign res_mode    = mode_q;
  assign res_winner  = win_q;
  assign res_dist    = wdist_q;
  assign res_label   = lab_rd_label;
  assign res_unknown = (wdist_q > unknown_thresh) || (lab_rd_label == LABEL_UNKNOWN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      mode_q    <= MODE_RECOG;
      xvec_q    <= '0;
      label_q   <= '0;
      addr_q    <= '0;
      rvalid_q  <= 1'b0;
      raddr_d_q <= '0;
      win_q     <= '0;
      wdist_q   <= '0;
      boot_q    <= 1'b1;
    end else begin
      if (init_start) boot_q <= 1'b0;
      rvalid_q  <= issuing;
      raddr_d_q <= addr_q;
      if (ham_en || upd_we) xvec_q <= {xvec_q[0], xvec_q[VEC_BITS-1:1]};
      if (issuing) addr_q <= last_addr ? '0 : addr_q + 1'b1;

      unique case (state_q)
        S_IDLE: begin
          addr_q <= '0;
          if (do_init) state_q <= S_INIT;
          else if (cmd_finalize) state_q <= S_FINAL;
          else if (vec_valid) begin
            xvec_q  <= vec;
            label_q <= vec_label;
            mode_q  <= mode;
            state_q <= S_DIST;
          end
        end
        S_INIT:       if (init_done) state_q <= S_INIT_WAIT;
        S_INIT_WAIT:  if (!lab_busy) state_q <= S_IDLE;
        S_FINAL:      if (lab_done)  state_q <= S_IDLE;
        S_DIST:       if (last_addr) state_q <= S_DIST_DRAIN;
        S_DIST_DRAIN: state_q <= S_WTA;
        S_WTA:        state_q <= S_WTA_WAIT;
        S_WTA_WAIT: if (wta_valid) begin
          win_q   <= wta_idx;
          wdist_q <= wta_dist;
          unique case (mode_q)
            MODE_TRAIN: state_q <= S_UPDATE;
            MODE_LABEL: state_q <= S_COUNT;
            default:    state_q <= S_RESULT;
          endcase
        end
        S_UPDATE:    if (last_addr) state_q <= S_UPD_DRAIN;
        S_UPD_DRAIN: state_q <= S_RESULT;
        S_COUNT:     state_q <= S_RESULT;
        S_RESULT:    state_q <= S_IDLE;
        default:     state_q <= S_IDLE;
      endcase
    end
  end

  // A new pattern is only taken while idle; the WTA answers only when asked.
  assert property (@(posedge clk) disable iff (!rst_n) wta_valid |-> state_q == S_WTA_WAIT)
    else $error("bsom_ctrl: unexpected WTA result");

endmodule
