// pattern_input_tb: self-checking test of the serial signature input.
//
// Streams random 768-bit vectors with random gaps in in_valid and checks
// that the assembled vector holds the first bit at vec[0], that the label
// sampled with the first bit is kept, that vec_valid rises exactly on the
// last bit, that in_ready stays low (back-pressure) until vec_take, and
// that a vector can be streamed in right after the previous one is taken.
module pattern_input_tb;
  localparam int unsigned VEC_BITS = 768;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_bit, in_ready, vec_valid, vec_take;
  logic [3:0] in_label, vec_label;
  logic [VEC_BITS-1:0] vec;

  int checks = 0, failures = 0, stalls = 0;

  pattern_input #(.VEC_BITS(VEC_BITS)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [VEC_BITS-1:0] ref_vec;
    logic [3:0]          ref_lab;
    rst_n = 0; in_valid = 0; in_bit = 0; in_label = 0; vec_take = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 12; p++) begin
      for (int i = 0; i < VEC_BITS; i += 32) ref_vec[i +: 32] = $urandom;
      ref_lab = 4'($urandom % 9);
      for (int i = 0; i < VEC_BITS; i++) begin
        @(negedge clk);
        while ((p % 2 == 1) && ($urandom % 3 == 0)) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_bit   = ref_vec[i];
        in_label = (i == 0) ? ref_lab : 4'($urandom);
        check(in_ready, "in_ready low while a vector is being collected");
        check(!vec_valid, "vec_valid before the last bit");
      end
      @(negedge clk);
      in_valid = 1; in_bit = 1'b1;       // offered but must be refused
      check(vec_valid, "vec_valid missing after the last bit");
      check(!in_ready, "in_ready high while the vector waits");
      check(vec == ref_vec, $sformatf("vector %0d differs", p));
      check(vec_label == ref_lab, "label differs");
      repeat (int'($urandom % 5)) begin
        @(negedge clk);
        stalls++;
        check(!in_ready && vec_valid && vec == ref_vec, "vector not held under back-pressure");
      end
      in_valid = 0; vec_take = 1;
      @(negedge clk);
      vec_take = 0;
      check(!vec_valid && in_ready, "vec_take did not release the buffer");
    end
    check(stalls > 0, "back-pressure never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
