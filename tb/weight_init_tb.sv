// weight_init_tb: self-checking test of the random weight initialiser.
//
// Checks that one start pulse produces exactly VEC_BITS writes, to
// addresses 0,1,2,... on consecutive clocks, with all neurons enabled, that
// `done` follows the last write, that every trit is a legal code, that the
// first words match an independent bit-serial model of the x^127+x+1 LFSR
// and trit mapping, and that the trit statistics are those intended
// (about 1/4 don't-care, the rest split evenly between 0 and 1).
module weight_init_tb;
  localparam int unsigned NEURONS  = 40;
  localparam int unsigned VEC_BITS = 768;
  localparam int unsigned AW       = $clog2(VEC_BITS);
  localparam logic [126:0] SEED    = 127'h1234_5678_9ABC_DEF0_0FED_CBA9_8765_4321;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, we;
  logic [AW-1:0]        waddr;
  logic [NEURONS-1:0]   wmask;
  logic [2*NEURONS-1:0] wdata;

  int checks = 0, failures = 0;

  weight_init #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS), .SEED(SEED)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent model: shift one step at a time and form the trits.
  logic [126:0] model_state;
  function automatic logic [2*NEURONS-1:0] model_word(logic [126:0] s);
    logic [2*NEURONS-1:0] w;
    for (int j = 0; j < NEURONS; j++)
      w[2*j +: 2] = (s[3*j] & s[3*j+1]) ? 2'b10 : {1'b0, s[3*j+2]};
    return w;
  endfunction

  initial begin
    int cyc;
    rst_n = 0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    model_state = SEED;
    cyc = 0;
    while (!done && cyc < 2000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(cyc == VEC_BITS, $sformatf("done after %0d clocks, expected %0d", cyc, VEC_BITS));
    @(posedge clk); #1;
    check(!done, "done longer than one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe writes at the clock edge where they take effect.
  int obs_writes = 0;
  logic [2*NEURONS-1:0] last_word;
  int n_dc_o = 0, n_one_o = 0, n_zero_o = 0, same_o = 0;
  always @(posedge clk) if (rst_n && we) begin
    check(int'(waddr) == obs_writes, $sformatf("write %0d went to address %0d", obs_writes, waddr));
    check(wmask == '1, "not all neurons enabled");
    if (obs_writes < 4) begin
      check(wdata == model_word(model_state), $sformatf("word %0d differs from LFSR model", obs_writes));
      for (int s = 0; s < 127; s++) model_state = {model_state[125:0], model_state[126] ^ model_state[0]};
    end
    for (int j = 0; j < NEURONS; j++) begin
      case (wdata[2*j +: 2])
        2'b00: n_zero_o++;
        2'b01: n_one_o++;
        2'b10: n_dc_o++;
        default: check(1'b0, "illegal trit code 11");
      endcase
    end
    if (obs_writes > 0 && wdata == last_word) same_o++;
    last_word = wdata;
    obs_writes++;
  end

  // Summary checks once the pass is complete.
  always @(posedge clk) if (rst_n && done) begin
    int total;
    total = n_dc_o + n_one_o + n_zero_o;
    check(obs_writes == VEC_BITS, $sformatf("%0d writes, expected %0d", obs_writes, VEC_BITS));
    check(total == VEC_BITS * NEURONS, "trit count");
    check(n_dc_o * 100 > total * 22 && n_dc_o * 100 < total * 28,
          $sformatf("don't-care share %0d/%0d", n_dc_o, total));
    check(n_one_o * 100 > (n_one_o + n_zero_o) * 47 && n_one_o * 100 < (n_one_o + n_zero_o) * 53,
          $sformatf("one share %0d/%0d", n_one_o, n_one_o + n_zero_o));
    check(same_o == 0, "two consecutive words identical");
    check(!busy, "busy still high with done");
  end
endmodule
