// bsom_workload_tb: the identification experiment at the reference sizes.
//
// Mirrors the experiment the design was built for, with synthetic data:
// nine objects, 2,248 training signatures, the same 2,248 signatures
// presented again with their labels for node labelling, and 1,139 test
// signatures, all on the default 40-neuron, 768-bit map. Each object has
// two appearance variants (a random prototype and a copy with 15% of its
// bits changed, standing for partial occlusion or segmentation changes) and
// every signature flips another 8% of the bits at random. Training makes
// ten passes over the set, the smallest training length in the published
// comparison (num_iters = 10 x 2,248), so the neighbourhood shrinks from 4
// to 1 over the ten passes.
//
// Every result is compared with the behavioural model (winner, distance,
// label, unknown flag), the weight memory is compared with the model after
// training, the pattern interval is checked (1,548 clocks when training)
// and the identification rate on the test set is printed; the test
// requires at least 85%.
module bsom_workload_tb;
  import bsom_pkg::*;
  localparam int unsigned NEURONS  = 40;
  localparam int unsigned VEC_BITS = 768;
  localparam int unsigned OBJECTS  = 9;
  localparam int unsigned N_TRAIN  = 2248;
  localparam int unsigned EPOCHS   = 10;
  localparam int unsigned N_LABEL  = 2248;
  localparam int unsigned N_TEST   = 1139;
  localparam int unsigned THRESH   = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cmd_init, cmd_finalize, busy, in_valid, in_bit, in_ready;
  mode_e mode, res_mode;
  logic [31:0] num_iters, iter;
  logic [9:0] unknown_thresh, res_dist;
  logic [2:0] nsize;
  logic [3:0] in_label, res_label;
  logic res_valid, res_unknown;
  logic [5:0] res_winner;
  logic vga_hsync, vga_vsync, vga_de, vga_frame_start;
  logic [3:0] vga_r, vga_g, vga_b;

  bsom_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 25) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  logic [1:0] W [VEC_BITS][NEURONS];      // model weights
  int         cnt [NEURONS][OBJECTS];
  int         mlabel [NEURONS];
  int         model_iter = 0;
  logic [VEC_BITS-1:0] proto [OBJECTS];
  logic [VEC_BITS-1:0] train_set [$];
  int                  train_lab [$];

  function automatic int model_dist(logic [VEC_BITS-1:0] v, int j);
    int d = 0;
    for (int k = 0; k < VEC_BITS; k++) if (!W[k][j][1] && W[k][j][0] != v[k]) d++;
    return d;
  endfunction

  function automatic void model_winner(logic [VEC_BITS-1:0] v, output int wj, output int wd);
    wd = 1 << 30; wj = 0;
    for (int j = 0; j < NEURONS; j++) begin
      int d = model_dist(v, j);
      if (d < wd) begin wd = d; wj = j; end
    end
  endfunction

  logic [VEC_BITS-1:0] variant [OBJECTS];

  // A signature of object o: one of its two variants with 8% of bits flipped.
  function automatic logic [VEC_BITS-1:0] sig(int o);
    logic [VEC_BITS-1:0] v;
    v = ($urandom % 2) ? variant[o] : proto[o];
    for (int k = 0; k < VEC_BITS; k++) if ($urandom % 100 < 8) v[k] = ~v[k];
    return v;
  endfunction

  // ---------------------------------------------------------------- stimulus queue
  logic [VEC_BITS-1:0] q_vec [$];
  int                  q_lab [$];
  logic [VEC_BITS-1:0] exp_vec [$];     // patterns in the order results will come
  int                  exp_lab [$];

  int backpressure = 0, overlap = 0, size_seen [5], frames = 0;
  int label_counts = 0, unknown_dist = 0, unknown_label = 0, known_ok = 0, known_total = 0;

  // Serial driver: one bit per clock whenever accepted.
  initial begin
    int i;
    logic [VEC_BITS-1:0] v;
    in_valid = 0; in_bit = 0; in_label = 0;
    forever begin
      @(negedge clk);
      if (q_vec.size() == 0) begin
        in_valid = 0;
        continue;
      end
      v = q_vec.pop_front();
      in_label = 4'(q_lab.pop_front());
      i = 0;
      while (i < VEC_BITS) begin
        in_valid = 1;
        in_bit = v[i];
        if (in_ready) begin
          if (busy) overlap++;
          i++;
        end else begin
          backpressure++;
        end
        if (i < VEC_BITS) @(negedge clk);
      end
    end
  end

  always @(posedge clk) if (rst_n && vga_frame_start) frames++;

  task automatic send(input logic [VEC_BITS-1:0] v, input int lab);
    q_vec.push_back(v); q_lab.push_back(lab);
    exp_vec.push_back(v); exp_lab.push_back(lab);
  endtask

  // Wait for the results of all queued patterns and check each one.
  task automatic collect(input mode_e m);
    int last_t = -1, t = 0;
    while (exp_vec.size() > 0 && t < 5000000) begin
      @(negedge clk);
      t++;
      if (res_valid) begin
        logic [VEC_BITS-1:0] v;
        int lab, wj, wd, ns;
        v = exp_vec.pop_front(); lab = exp_lab.pop_front();
        model_winner(v, wj, wd);
        check(res_mode == m, "result mode");
        check(int'(res_winner) == wj && int'(res_dist) == wd,
              $sformatf("winner %0d/%0d, model %0d/%0d", res_winner, res_dist, wj, wd));
        if (last_t >= 0) begin
          int expect_gap = (m == MODE_TRAIN) ? 2 * VEC_BITS + 12 : (m == MODE_LABEL) ? VEC_BITS + 12 : VEC_BITS + 11;
          check(t - last_t == expect_gap, $sformatf("pattern interval %0d, expected %0d", t - last_t, expect_gap));
          if (m == MODE_TRAIN) check(t - last_t <= 1600, "training slower than 25,000 patterns/s at 40 MHz");
        end
        last_t = t;
        if (m == MODE_TRAIN) begin
          ns = 4 - (4 * model_iter) / int'(num_iters);
          if (ns < 1) ns = 1;
          size_seen[ns]++;
          for (int j = 0; j < NEURONS; j++) begin
            int dd = (j > wj) ? j - wj : wj - j;
            if (dd < ns)
              for (int k = 0; k < VEC_BITS; k++) begin
                if (W[k][j][1]) W[k][j] = {1'b0, v[k]};
                else if (W[k][j][0] != v[k]) W[k][j] = 2'b10;
              end
          end
          model_iter++;
        end else if (m == MODE_LABEL) begin
          cnt[wj][lab]++;
          label_counts++;
        end else begin
          int el;
          logic eu;
          el = mlabel[wj];
          eu = (wd > int'(THRESH)) || (el == 15);
          check(int'(res_label) == el && res_unknown == eu,
                $sformatf("recognition label %0d/%0d, model %0d/%0d", res_label, res_unknown, el, eu));
          if (wd > int'(THRESH)) unknown_dist++;
          else if (el == 15) unknown_label++;
          if (lab < int'(OBJECTS)) begin
            known_total++;
            if (!res_unknown && int'(res_label) == lab) known_ok++;
          end
        end
      end
    end
    check(exp_vec.size() == 0, "results missing");
    @(negedge clk);
    check(!busy, "busy after the last result");
  endtask

  task automatic compare_memory(input string when);
    int bad = 0;
    for (int k = 0; k < VEC_BITS; k++)
      for (int j = 0; j < NEURONS; j++) begin
        logic [1:0] t = dut.u_mem.mem[k][2*j +: 2];
        if (t != W[k][j]) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %0d weight trits differ from the model %s", bad, when);
    end
  endtask

  initial begin
    int t, n_dc;
    rst_n = 0; cmd_init = 0; cmd_finalize = 0; mode = MODE_TRAIN;
    num_iters = N_TRAIN * EPOCHS; unknown_thresh = 10'(THRESH);
    foreach (size_seen[i]) size_seen[i] = 0;
    for (int o = 0; o < OBJECTS; o++)
      for (int k = 0; k < VEC_BITS; k += 32) proto[o][k +: 32] = $urandom;
    for (int o = 0; o < OBJECTS; o++) begin
      variant[o] = proto[o];
      for (int k = 0; k < VEC_BITS; k++) if ($urandom % 100 < 15) variant[o][k] = ~variant[o][k];
    end
    repeat (5) @(posedge clk);
    rst_n = 1;

    // 1. initialisation, started by the design itself after reset
    t = 0;
    @(negedge clk);
    while (busy && t < 5000) begin @(negedge clk); t++; end
    check(t >= VEC_BITS && t <= VEC_BITS + 3, $sformatf("initialisation took %0d clocks", t));
    check(iter == 0 && nsize == 4, "iteration count cleared");
    n_dc = 0;
    for (int k = 0; k < VEC_BITS; k++)
      for (int j = 0; j < NEURONS; j++) begin
        W[k][j] = dut.u_mem.mem[k][2*j +: 2];
        if (W[k][j] == 2'b10) n_dc++;
        check(W[k][j] != 2'b11, "illegal trit after initialisation");
      end
    check(n_dc > VEC_BITS * NEURONS / 5 && n_dc < VEC_BITS * NEURONS * 3 / 10, "don't-care share after init");
    foreach (cnt[j, o]) cnt[j][o] = 0;

    // 2. training
    mode = MODE_TRAIN;
    for (int p = 0; p < N_TRAIN; p++) begin
      int o;
      o = int'($urandom % OBJECTS);
      train_set.push_back(sig(o));
      train_lab.push_back(o);
    end
    for (int e = 0; e < EPOCHS; e++) begin
      for (int p = 0; p < N_TRAIN; p++) send(train_set[p], train_lab[p]);
      collect(MODE_TRAIN);
      compare_memory($sformatf("after training pass %0d", e + 1));
    end
    check(int'(iter) == N_TRAIN * EPOCHS, "iteration count after training");
    for (int s = 1; s <= 4; s++) check(size_seen[s] > 0, $sformatf("neighbourhood size %0d never used", s));

    // 3. labelling
    mode = MODE_LABEL;
    for (int p = 0; p < N_LABEL; p++) send(train_set[p], train_lab[p]);
    collect(MODE_LABEL);
    @(negedge clk); cmd_finalize = 1;
    @(negedge clk); cmd_finalize = 0;
    t = 0;
    while (busy && t < 5000) begin @(negedge clk); t++; end
    for (int j = 0; j < NEURONS; j++) begin
      int best;
      best = 0;
      mlabel[j] = 15;
      for (int o = 0; o < OBJECTS; o++) if (cnt[j][o] > best) begin best = cnt[j][o]; mlabel[j] = o; end
    end
    compare_memory("after labelling");

    // 4. recognition
    mode = MODE_RECOG;
    for (int p = 0; p < N_TEST; p++) begin
      int o;
      o = int'($urandom % OBJECTS);
      send(sig(o), o);
    end
    for (int p = 0; p < 3; p++) begin
      logic [VEC_BITS-1:0] r;
      for (int k = 0; k < VEC_BITS; k += 32) r[k +: 32] = $urandom;
      send(r, 15);
    end
    // a signature equal to a never-labelled neuron, if it wins
    for (int j = 0; j < NEURONS; j++) if (mlabel[j] == 15) begin
      logic [VEC_BITS-1:0] r;
      int wj, wd;
      for (int k = 0; k < VEC_BITS; k++) r[k] = W[k][j][1] ? 1'($urandom) : W[k][j][0];
      model_winner(r, wj, wd);
      if (mlabel[wj] == 15 && wd <= int'(THRESH)) begin
        send(r, 15);
        break;
      end
    end
    collect(MODE_RECOG);
    compare_memory("after recognition");
    $display("recognised %0d of %0d known signatures; unknown by distance %0d, by label %0d",
             known_ok, known_total, unknown_dist, unknown_label);
    check(known_ok * 100 >= known_total * 85, "fewer than 85% of the test signatures identified");

    // mechanisms
    check(backpressure > 0, "back-pressure never happened");
    check(overlap > 0, "input never overlapped processing");
    check(label_counts == N_LABEL, "label counts");
    check(unknown_dist >= 3, "unknown by distance never happened");
    $display("mechanisms: backpressure=%0d overlap=%0d sizes 4/3/2/1=%0d/%0d/%0d/%0d label_counts=%0d unknown_dist=%0d unknown_label=%0d frames=%0d",
             backpressure, overlap, size_seen[4], size_seen[3], size_seen[2], size_seen[1],
             label_counts, unknown_dist, unknown_label, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
