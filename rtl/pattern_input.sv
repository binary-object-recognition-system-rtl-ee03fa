// pattern_input: acquires one binary signature from the serial input.
//
// The signature is a 32x24 binary image (VEC_BITS = 768 bits) sent one bit
// per accepted beat, pixel 0 first, row by row. Bits are shifted in from the
// top, so after VEC_BITS beats the first bit received sits at vec[0]. A
// label travels with each signature; it is sampled with the first bit and is
// used only when the engine is counting label wins.
//
// Handshake: a beat is accepted on a clock edge with in_valid && in_ready.
// When the last bit arrives the vector is complete: vec_valid rises and
// in_ready falls until the consumer pulses vec_take (it copies vec in that
// cycle). The next signature can then stream in while the previous one is
// being processed, so input runs in parallel with the WTA block as in the
// reference design. The valid/ready handshake itself is this design's choice.
module pattern_input #(
  parameter int unsigned VEC_BITS = 768,
  localparam int unsigned LABEL_W = bsom_pkg::LABEL_W,
  localparam int unsigned CW      = $clog2(VEC_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_bit,
  input  logic [LABEL_W-1:0]  in_label,
  output logic                in_ready,
  output logic                vec_valid,
  output logic [VEC_BITS-1:0] vec,
  output logic [LABEL_W-1:0]  vec_label,
  input  logic                vec_take
);

  logic [CW-1:0] count_q;

  assign in_ready = !vec_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q   <= '0;
      vec_valid <= 1'b0;
      vec       <= '0;
      vec_label <= '0;
    end else begin
      if (vec_valid && vec_take) vec_valid <= 1'b0;
      if (in_valid && in_ready) begin
        vec <= {in_bit, vec[VEC_BITS-1:1]};
        if (count_q == '0) vec_label <= in_label;
        if (count_q == CW'(VEC_BITS - 1)) begin
          count_q   <= '0;
          vec_valid <= 1'b1;
        end else begin
          count_q <= count_q + 1'b1;
        end
      end
    end
  end

  // The consumer may only take a complete vector.
  assert property (@(posedge clk) disable iff (!rst_n) vec_take |-> vec_valid)
    else $error("pattern_input: vec_take without a complete vector");

endmodule
