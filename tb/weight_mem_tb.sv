// weight_mem_tb: self-checking test of the bit-position weight memory.
//
// Fills the memory through the write port, then mixes random masked writes
// with reads on both read ports. A shadow copy in the testbench predicts
// every read word; reads return one clock after the address, and a read of
// the word written in the same clock must return the old contents.
module weight_mem_tb;
  localparam int unsigned NEURONS  = 40;
  localparam int unsigned VEC_BITS = 768;
  localparam int unsigned AW       = $clog2(VEC_BITS);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 we, re_r, re_d;
  logic [AW-1:0]        waddr, raddr_r, raddr_d;
  logic [NEURONS-1:0]   wmask;
  logic [2*NEURONS-1:0] wdata, rdata_r, rdata_d;
  logic [2*NEURONS-1:0] shadow [VEC_BITS];

  int checks = 0, failures = 0;

  weight_mem #(.NEURONS(NEURONS), .VEC_BITS(VEC_BITS)) dut (.*);

  function automatic logic [2*NEURONS-1:0] rand_word();
    logic [2*NEURONS-1:0] w;
    for (int i = 0; i < 2*NEURONS; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  function automatic logic [2*NEURONS-1:0] merge(logic [2*NEURONS-1:0] old, logic [2*NEURONS-1:0] nw,
                                                logic [NEURONS-1:0] m);
    logic [2*NEURONS-1:0] r;
    r = old;
    for (int j = 0; j < NEURONS; j++) if (m[j]) r[2*j +: 2] = nw[2*j +: 2];
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*NEURONS-1:0] exp_r, exp_d;
    we = 0; re_r = 0; re_d = 0; waddr = '0; raddr_r = '0; raddr_d = '0; wmask = '0; wdata = '0;
    // fill
    for (int a = 0; a < VEC_BITS; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wmask = '1; wdata = rand_word();
      shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // random traffic
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we      = ($urandom % 2) == 0;
      waddr   = AW'($urandom % VEC_BITS);
      wmask   = {$urandom, $urandom};
      wdata   = rand_word();
      re_r    = 1;
      re_d    = ($urandom % 4) != 0;
      raddr_r = ($urandom % 3 == 0) ? waddr : AW'($urandom % VEC_BITS);
      raddr_d = AW'($urandom % VEC_BITS);
      exp_r   = shadow[raddr_r];
      exp_d   = re_d ? shadow[raddr_d] : rdata_d;
      if (we) shadow[waddr] = merge(shadow[waddr], wdata, wmask);
      @(posedge clk); #1;
      checks++;
      if (rdata_r !== exp_r) begin
        failures++;
        if (failures < 10) $display("port R mismatch addr %0d: %h vs %h", raddr_r, rdata_r, exp_r);
      end
      checks++;
      if (rdata_d !== exp_d) begin
        failures++;
        if (failures < 10) $display("port D mismatch addr %0d", raddr_d);
      end
    end
    // read everything back
    @(negedge clk); we = 0; re_d = 1;
    for (int a = 0; a < VEC_BITS; a++) begin
      @(negedge clk); raddr_r = AW'(a); raddr_d = AW'(VEC_BITS - 1 - a);
      @(posedge clk); #1;
      checks++;
      if (rdata_r !== shadow[a] || rdata_d !== shadow[VEC_BITS-1-a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
