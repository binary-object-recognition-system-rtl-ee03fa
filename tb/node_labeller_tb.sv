// node_labeller_tb: self-checking test of win counting and node labelling.
//
// Clears the counters, presents random (winner, label) events, some with
// out-of-range labels that must be ignored, finalises and compares every
// neuron's label with the most frequent label computed here (lowest label on
// a tie, unknown when a neuron never won). Checks the pass lengths
// (NEURONS*NUM_LABELS clocks each), that a second clear makes all labels
// unknown again, and that events during a pass are ignored.
module node_labeller_tb;
  localparam int unsigned NEURONS    = 40;
  localparam int unsigned NUM_LABELS = 9;
  localparam logic [3:0]  UNKNOWN    = 4'hF;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr_start, fin_start, busy, done, cnt_en;
  logic [5:0] cnt_neuron, rd_neuron;
  logic [3:0] cnt_label, rd_label;

  int checks = 0, failures = 0;
  int ref_cnt [NEURONS][NUM_LABELS];

  node_labeller #(.NEURONS(NEURONS), .NUM_LABELS(NUM_LABELS)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_pass(input logic is_clear);
    int len;
    @(negedge clk);
    if (is_clear) clr_start = 1; else fin_start = 1;
    @(negedge clk);
    clr_start = 0; fin_start = 0;
    len = 0;
    while (!done && len < 5000) begin
      // events offered during a pass must be ignored
      cnt_en = 1; cnt_neuron = 6'($urandom % NEURONS); cnt_label = 4'($urandom % NUM_LABELS);
      @(negedge clk);
      len++;
    end
    cnt_en = 0;
    check(len == NEURONS * NUM_LABELS, $sformatf("pass took %0d clocks", len));
  endtask

  task automatic check_labels();
    for (int j = 0; j < NEURONS; j++) begin
      int best, bl;
      best = 0; bl = UNKNOWN;
      for (int l = 0; l < NUM_LABELS; l++)
        if (ref_cnt[j][l] > best) begin best = ref_cnt[j][l]; bl = l; end
      rd_neuron = 6'(j);
      #1;
      check(int'(rd_label) == bl, $sformatf("neuron %0d label %0d, expected %0d", j, rd_label, bl));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr_start = 0; fin_start = 0; cnt_en = 0; cnt_neuron = '0; cnt_label = '0; rd_neuron = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      run_pass(1'b1);
      foreach (ref_cnt[j, l]) ref_cnt[j][l] = 0;
      check_labels();
      for (int e = 0; e < 3000; e++) begin
        int n, l;
        @(negedge clk);
        cnt_en = ($urandom % 4) != 0;
        n = (round == 2) ? int'($urandom % 10) : int'($urandom % (NEURONS - 5));  // some neurons never win
        l = (round == 1) ? int'($urandom % 2) : int'($urandom % (NUM_LABELS + 3));
        if (n % 7 == 3) l = n % NUM_LABELS;        // make some labels clear winners
        cnt_neuron = 6'(n); cnt_label = 4'(l);
        if (cnt_en && l < NUM_LABELS) ref_cnt[n][l]++;
      end
      @(negedge clk); cnt_en = 0;
      run_pass(1'b0);
      check_labels();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
