// bsom_ctrl_tb: self-checking test of the bSOM sequencer on its own.
//
// The controller runs with 8 neurons and 16-bit vectors against small
// models: the WTA tree answers 7 clocks after it is started with a random
// winner, the initialiser and labeller signal done after fixed delays, and
// a random label table answers label lookups. For patterns in all three
// modes the test checks the read addresses of each pass (0..VEC_BITS-1 on
// consecutive clocks), that the distance and update enables follow their
// reads by one clock with the matching input bit, the write addresses of
// the update, the single WTA start, iteration step and label count, the
// result fields including the unknown decision, and the exact number of
// clocks per pattern: 2*VEC_BITS+11 from take to result when training,
// VEC_BITS+10 when recognising, VEC_BITS+11 when labelling. It also checks
// the initialisation the controller starts by itself after reset.
module bsom_ctrl_tb;
  import bsom_pkg::*;
  localparam int unsigned NEURONS  = 8;
  localparam int unsigned VEC_BITS = 16;
  localparam int unsigned DIST_W   = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cmd_init, cmd_finalize, busy, vec_valid, vec_take;
  mode_e mode, res_mode;
  logic [DIST_W-1:0] unknown_thresh, wta_dist, res_dist;
  logic [VEC_BITS-1:0] vec;
  logic [3:0] vec_label, lab_cnt_label, lab_rd_label, res_label;
  logic init_start, init_done, lab_clr_start, lab_fin_start, lab_busy, lab_done, lab_cnt_en;
  logic [2:0] lab_cnt_neuron, lab_rd_neuron, wta_idx, winner, res_winner;
  logic mem_re, upd_we, ham_clr, ham_en, x_bit, wta_start, wta_valid, iter_clr, iter_inc;
  logic res_valid, res_unknown;
  logic [3:0] mem_raddr, upd_waddr;

  int checks = 0, failures = 0;
  logic [3:0] label_table [NEURONS];

  bsom_ctrl #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS), .DIST_W(DIST_W)) dut (.*);

  assign lab_rd_label = label_table[lab_rd_neuron];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one command (init or finalize) against the delay models.
  task automatic run_command(input logic is_init);
    int n;
    @(negedge clk);
    if (is_init) cmd_init = 1; else cmd_finalize = 1;
    #1;
    if (is_init) check(init_start && lab_clr_start && iter_clr && !lab_fin_start, "init strobes");
    else         check(lab_fin_start && !init_start, "finalize strobe");
    check(!vec_take, "pattern taken together with a command");
    @(negedge clk);
    cmd_init = 0; cmd_finalize = 0; lab_busy = 1;
    n = 0;
    while (busy && n < 100) begin
      init_done = is_init && (n == 20);
      lab_done  = !is_init && (n == 30);
      if (n == (is_init ? 25 : 30)) lab_busy = 0;
      @(negedge clk);
      init_done = 0; lab_done = 0;
      n++;
    end
    lab_busy = 0;
    check(n == (is_init ? 26 : 31), $sformatf("command finished after %0d clocks", n));
  endtask

  // Process one pattern in the given mode and check everything on the way.
  task automatic run_pattern(input mode_e m);
    int cyc, t_take, reads, hams, upds, wta_starts, countdown, iter_incs, counts, results, expect_len;
    logic prev_re;
    logic [3:0] prev_addr;
    logic [2:0] widx;
    logic [DIST_W-1:0] wd;
    logic [VEC_BITS-1:0] v;
    logic [3:0] vl;
    v  = VEC_BITS'($urandom);
    vl = 4'($urandom % 9);
    widx = 3'($urandom % NEURONS);
    wd   = DIST_W'($urandom % 20);
    @(negedge clk);
    vec_valid = 1; vec = v; vec_label = vl; mode = m;
    cyc = 0; t_take = -1; reads = 0; hams = 0; upds = 0; wta_starts = 0; countdown = -1;
    iter_incs = 0; counts = 0; results = 0; prev_re = 0; prev_addr = '0;
    while (results == 0 && cyc < 200) begin
      #1;
      if (vec_take) begin
        check(t_take < 0 && ham_clr, "take once with counter clear");
        t_take = cyc;
      end
      if (mem_re) begin
        check(int'(mem_raddr) == reads % VEC_BITS, "read address order");
        reads++;
      end
      check(ham_en == (prev_re && reads <= VEC_BITS + (mem_re ? 1 : 0) && hams < VEC_BITS), "ham_en timing");
      if (ham_en) begin
        check(x_bit == v[hams], $sformatf("distance bit %0d", hams));
        hams++;
      end
      if (upd_we) begin
        check(prev_re && upd_waddr == prev_addr, "update write follows its read");
        check(int'(upd_waddr) == upds && x_bit == v[upds], $sformatf("update bit %0d", upds));
        check(winner == widx, "winner given to the update");
        upds++;
      end
      if (wta_start) begin
        check(hams == VEC_BITS, "WTA started before all bits");
        wta_starts++;
        countdown = 7;
      end
      if (iter_inc) iter_incs++;
      if (lab_cnt_en) begin
        check(lab_cnt_neuron == widx && lab_cnt_label == vl, "label count fields");
        counts++;
      end
      if (res_valid) begin
        results++;
        check(res_mode == m && res_winner == widx && res_dist == wd, "result fields");
        check(res_label == label_table[widx], "result label");
        check(res_unknown == ((wd > unknown_thresh) || (label_table[widx] == 4'hF)), "unknown flag");
        expect_len = (m == MODE_TRAIN) ? 2 * VEC_BITS + 11 : (m == MODE_LABEL) ? VEC_BITS + 11 : VEC_BITS + 10;
        check(cyc - t_take == expect_len, $sformatf("result after %0d clocks, expected %0d", cyc - t_take, expect_len));
      end
      prev_re = mem_re;
      prev_addr = mem_raddr;
      @(negedge clk);
      cyc++;
      if (t_take >= 0) begin
        vec_valid = 0;
        vec = ~v;                    // the copy taken must be used, not the port
        mode = mode_e'(2'((int'(m) + 1) % 3));
        vec_label = ~vl;
      end
      wta_valid = 0;
      if (countdown > 0) begin
        countdown--;
        if (countdown == 0) begin
          wta_valid = 1; wta_idx = widx; wta_dist = wd;
        end
      end
    end
    #1;
    check(!busy, "still busy after the result");
    check(reads == ((m == MODE_TRAIN) ? 2 : 1) * VEC_BITS, $sformatf("%0d reads", reads));
    check(hams == VEC_BITS && wta_starts == 1, "distance pass and WTA start");
    check(upds == ((m == MODE_TRAIN) ? VEC_BITS : 0), "update writes");
    check(iter_incs == ((m == MODE_TRAIN) ? 1 : 0), "iteration step");
    check(counts == ((m == MODE_LABEL) ? 1 : 0), "label count");
  endtask

  initial begin
    rst_n = 0; cmd_init = 0; cmd_finalize = 0; mode = MODE_TRAIN; unknown_thresh = 10'd10;
    vec_valid = 0; vec = '0; vec_label = '0; init_done = 0; lab_busy = 0; lab_done = 0;
    wta_valid = 0; wta_idx = '0; wta_dist = '0;
    foreach (label_table[j]) label_table[j] = (j % 3 == 0) ? 4'hF : 4'(j % 9);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // start-up initialisation without a command
    #1;
    check(init_start && lab_clr_start && iter_clr, "no initialisation at start-up");
    @(negedge clk);
    check(busy && !init_start, "start-up initialisation not running");
    repeat (5) @(negedge clk);
    init_done = 1;
    @(negedge clk);
    init_done = 0;
    @(negedge clk);
    check(!busy, "start-up initialisation did not finish");
    run_command(1'b1);
    for (int p = 0; p < 30; p++) run_pattern(mode_e'(2'(p % 3)));
    run_command(1'b0);
    for (int p = 0; p < 6; p++) run_pattern(MODE_RECOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
