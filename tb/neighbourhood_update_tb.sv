// neighbourhood_update_tb: self-checking test of the neighbourhood block.
//
// 1. Schedule: with 100 planned iterations the size must be 4 for
//    iterations 0-24, 3 for 25-49, 2 for 50-74 and 1 from 75 on; also
//    checked for 10 and 7 iterations against floor arithmetic done here.
// 2. Mask: for every winner and size, exactly the neurons with
//    |j - winner| < size are enabled (clipped at both ends of the chain).
// 3. Rule: every (trit, input bit) pair gives the expected new trit in_nbh
//    the neighbourhood and the unchanged trit outside; iter_clr restarts.
module neighbourhood_update_tb;
  localparam int unsigned NEURONS   = 40;
  localparam int unsigned MAX_NEIGH = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, iter_clr, iter_inc, x;
  logic [31:0] num_iters, iter;
  logic [2:0]  nsize;
  logic [5:0]  winner;
  logic [NEURONS-1:0]   wmask;
  logic [2*NEURONS-1:0] w_in, w_out;

  int checks = 0, failures = 0;

  neighbourhood_update #(.NEURONS(NEURONS), .MAX_NEIGH(MAX_NEIGH)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [1:0] ref_step(logic [1:0] t, logic xb);
    case (t)
      2'b00:   return xb ? 2'b10 : 2'b00;
      2'b01:   return xb ? 2'b01 : 2'b10;
      default: return {1'b0, xb};
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes_seen [5];
    rst_n = 0; iter_clr = 0; iter_inc = 0; x = 0; num_iters = 100; winner = '0; w_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sizes_seen[i]) sizes_seen[i] = 0;
    // schedule for 100 iterations
    for (int it = 0; it < 110; it++) begin
      int expn;
      @(negedge clk);
      expn = (it < 25) ? 4 : (it < 50) ? 3 : (it < 75) ? 2 : 1;
      check(int'(iter) == it, "iteration count");
      check(int'(nsize) == expn, $sformatf("iteration %0d: size %0d, expected %0d", it, nsize, expn));
      sizes_seen[nsize]++;
      // mask and rule at this size, random winner and word
      winner = 6'($urandom % NEURONS);
      if (it % 20 == 0) winner = 6'(0);
      if (it % 20 == 1) winner = 6'(NEURONS - 1);
      x = 1'($urandom);
      for (int j = 0; j < NEURONS; j++) w_in[2*j +: 2] = 2'($urandom % 3);
      #1;
      for (int j = 0; j < NEURONS; j++) begin
        int dd;
        logic in_nbh;
        dd = (j > int'(winner)) ? j - int'(winner) : int'(winner) - j;
        in_nbh = dd < expn;
        check(wmask[j] == in_nbh, $sformatf("mask of neuron %0d, winner %0d, size %0d", j, winner, expn));
        check(w_out[2*j +: 2] == (in_nbh ? ref_step(w_in[2*j +: 2], x) : w_in[2*j +: 2]),
              $sformatf("new trit of neuron %0d", j));
      end
      iter_inc = 1;
      @(negedge clk);
      iter_inc = 0;
    end
    check(sizes_seen[4] == 25 && sizes_seen[3] == 25 && sizes_seen[2] == 25 && sizes_seen[1] == 35,
          "every size used for a quarter of the iterations");
    // other totals: size = 4 - floor(4*it/total)
    for (int total = 7; total <= 10; total += 3) begin
      @(negedge clk); iter_clr = 1; num_iters = total;
      @(negedge clk); iter_clr = 0;
      for (int it = 0; it < total; it++) begin
        #1;
        check(int'(nsize) == 4 - (4 * it) / total, $sformatf("total %0d iteration %0d", total, it));
        iter_inc = 1;
        @(negedge clk);
        iter_inc = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
