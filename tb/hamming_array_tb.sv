// hamming_array_tb: self-checking test of the bit-serial distance counters.
//
// Presents 768 random bit positions (input bit plus the trits of 40
// neurons) and compares every counter with distances computed here from
// the definition: count positions where the trit is 0 or 1 and differs from
// the input; don't-care positions never count. Neuron 0 is all don't-care
// (distance 0), neuron 1 is the input's complement (distance 768), neuron 2
// equals the input (distance 0). Also checks clr and gaps in en.
module hamming_array_tb;
  localparam int unsigned NEURONS  = 40;
  localparam int unsigned DIST_W   = 10;
  localparam int unsigned VEC_BITS = 768;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en, x;
  logic [2*NEURONS-1:0] w;
  logic [DIST_W-1:0]    hdist [NEURONS];

  int checks = 0, failures = 0;
  int ref_d [NEURONS];

  hamming_array #(.NEURONS(NEURONS), .DIST_W(DIST_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr = 0; en = 0; x = 0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk); clr = 1; en = 1;   // clr wins over en
      @(negedge clk); clr = 0; en = 0;
      foreach (ref_d[j]) ref_d[j] = 0;
      for (int k = 0; k < VEC_BITS; k++) begin
        if ($urandom % 4 == 0) begin
          @(negedge clk); en = 0; x = ~x; w = ~w;   // idle clock: must not count
        end
        @(negedge clk);
        en = 1;
        x  = 1'($urandom);
        for (int j = 0; j < NEURONS; j++) begin
          logic [1:0] t;
          case (j)
            0: t = 2'b10;
            1: t = {1'b0, ~x};
            2: t = {1'b0, x};
            default: begin
              t = 2'($urandom % 3);
              if (round == 2 && $urandom % 8 == 0) t = 2'b11;  // unused code acts as don't-care
            end
          endcase
          w[2*j +: 2] = t;
          if (!t[1] && t[0] != x) ref_d[j]++;
        end
      end
      @(negedge clk); en = 0;
      for (int j = 0; j < NEURONS; j++) begin
        checks++;
        if (int'(hdist[j]) != ref_d[j]) begin
          failures++;
          if (failures < 10) $display("neuron %0d: %0d, expected %0d", j, hdist[j], ref_d[j]);
        end
      end
      checks++;
      if (hdist[0] != 0 || hdist[1] != DIST_W'(VEC_BITS) || hdist[2] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
