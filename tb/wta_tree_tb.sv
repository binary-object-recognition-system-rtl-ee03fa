// wta_tree_tb: self-checking test of the winner-take-all comparator tree.
//
// Feeds a new set of 40 random distances every clock (with frequent ties
// and an occasional gap) and checks each result against a linear search
// done here: the smallest distance wins, the lowest index on a tie. Checks
// that each result appears exactly seven clocks after its input and that
// no result appears without an input.
module wta_tree_tb;
  localparam int unsigned NEURONS = 40;
  localparam int unsigned DIST_W  = 10;
  localparam int unsigned LATENCY = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  logic [DIST_W-1:0] hdist [NEURONS];
  logic [5:0]        win_idx;
  logic [DIST_W-1:0] win_dist;

  int checks = 0, failures = 0;
  int exp_idx [$], exp_dist [$], exp_time [$];
  int cycle = 0;

  wta_tree #(.NEURONS(NEURONS), .DIST_W(DIST_W)) dut (.*);

  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_idx.size() == 0) begin
        failures++;
        $display("result without input");
      end else begin
        int ei, ed, et;
        ei = exp_idx.pop_front(); ed = exp_dist.pop_front(); et = exp_time.pop_front();
        if (int'(win_idx) != ei || int'(win_dist) != ed || cycle - et != LATENCY) begin
          failures++;
          if (failures < 10)
            $display("got %0d/%0d after %0d, expected %0d/%0d after %0d",
                     win_idx, win_dist, cycle - et, ei, ed, LATENCY);
        end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0;
    foreach (hdist[j]) hdist[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int best, bi, range;
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      range = (t % 3 == 0) ? 4 : 769;
      for (int j = 0; j < NEURONS; j++) hdist[j] = DIST_W'($urandom % range);
      if (t == 5) foreach (hdist[j]) hdist[j] = 10'd100;        // all equal -> 0
      if (t == 6) begin
        foreach (hdist[j]) hdist[j] = 10'd768;
        hdist[NEURONS-1] = 10'd767;                            // last neuron wins
      end
      if (in_valid) begin
        best = 1 << 30; bi = 0;
        for (int j = 0; j < NEURONS; j++)
          if (int'(hdist[j]) < best) begin best = int'(hdist[j]); bi = j; end
        exp_idx.push_back(bi); exp_dist.push_back(best); exp_time.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (exp_idx.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
