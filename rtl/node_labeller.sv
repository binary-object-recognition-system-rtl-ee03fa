// node_labeller: win-frequency counting and node labelling.
//
// After training, labelled signatures are presented once more. For each one
// the winning neuron's counter for that signature's label is incremented
// (`cnt_en` with `cnt_neuron`, `cnt_label`); labels at or above NUM_LABELS,
// such as the unknown code, are not counted. `fin_start` then gives every
// neuron the label it won most often (lowest label on a tie). A neuron that
// never won is labelled LABEL_UNKNOWN. The label table is read with
// `rd_neuron` -> `rd_label` (combinational) to name a recognised object.
// This follows the reference labelling procedure; where it runs (here, on
// chip) and the sequential implementation are this design's choices.
//
// The counters sit in a NEURONS x NUM_LABELS memory, CNT_W bits each,
// saturating. `clr_start` zeroes all counters and marks every label unknown,
// one counter per clock (NEURONS*NUM_LABELS clocks). Finalising reads one
// counter per clock (also NEURONS*NUM_LABELS clocks). `busy` is high during
// either pass and `done` pulses after it; counting is ignored while busy.
module node_labeller #(
  parameter int unsigned NEURONS    = 40,
  parameter int unsigned NUM_LABELS = 9,
  parameter int unsigned CNT_W      = 16,
  localparam int unsigned IW        = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned LABEL_W   = bsom_pkg::LABEL_W,
  localparam int unsigned ENTRIES   = NEURONS * NUM_LABELS,
  localparam int unsigned EW        = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr_start,
  input  logic               fin_start,
  output logic               busy,
  output logic               done,
  input  logic               cnt_en,
  input  logic [IW-1:0]      cnt_neuron,
  input  logic [LABEL_W-1:0] cnt_label,
  input  logic [IW-1:0]      rd_neuron,
  output logic [LABEL_W-1:0] rd_label
);
  import bsom_pkg::*;

  initial assert (NUM_LABELS < 2**LABEL_W) else $fatal(1, "node_labeller: label code space too small");

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_FINAL} state_e;

  logic [CNT_W-1:0]   cnt_mem [ENTRIES];
  logic [LABEL_W-1:0] label_q [NEURONS];
  state_e             state_q;
  logic [EW-1:0]      ptr_q;      // counter address in a pass
  logic [IW-1:0]      nrn_q;      // neuron being finalised
  logic [LABEL_W-1:0] lab_q;      // label index within that neuron
  logic [CNT_W-1:0]   best_cnt_q;
  logic [LABEL_W-1:0] best_lab_q;

  assign busy     = (state_q != S_IDLE);
  assign rd_label = label_q[rd_neuron];

  wire logic [EW-1:0] cnt_addr = EW'(cnt_neuron) * EW'(NUM_LABELS) + EW'(cnt_label);

  // Counter memory: one write per clock from whichever pass owns it.
  always_ff @(posedge clk) begin
    if (state_q == S_CLEAR)
      cnt_mem[ptr_q] <= '0;
    else if (state_q == S_IDLE && cnt_en && (cnt_label < LABEL_W'(NUM_LABELS))
             && (32'(cnt_neuron) < NEURONS) && (cnt_mem[cnt_addr] != '1))
      cnt_mem[cnt_addr] <= cnt_mem[cnt_addr] + 1'b1;
  end

  // Running maximum over the labels of the neuron being finalised.
  logic [CNT_W-1:0]   fin_cnt;
  logic [LABEL_W-1:0] fin_lab;
  always_comb begin
    if (cnt_mem[ptr_q] > best_cnt_q) begin
      fin_cnt = cnt_mem[ptr_q];
      fin_lab = lab_q;
    end else begin
      fin_cnt = best_cnt_q;
      fin_lab = best_lab_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      done       <= 1'b0;
      ptr_q      <= '0;
      nrn_q      <= '0;
      lab_q      <= '0;
      best_cnt_q <= '0;
      best_lab_q <= LABEL_UNKNOWN;
      for (int j = 0; j < NEURONS; j++) label_q[j] <= LABEL_UNKNOWN;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          ptr_q      <= '0;
          nrn_q      <= '0;
          lab_q      <= '0;
          best_cnt_q <= '0;
          best_lab_q <= LABEL_UNKNOWN;
          if (clr_start)      state_q <= S_CLEAR;
          else if (fin_start) state_q <= S_FINAL;
        end
        S_CLEAR: begin
          if (32'(ptr_q) < NEURONS) label_q[ptr_q[IW-1:0]] <= LABEL_UNKNOWN;
          if (ptr_q == EW'(ENTRIES - 1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
          ptr_q <= ptr_q + 1'b1;
        end
        S_FINAL: begin
          ptr_q <= ptr_q + 1'b1;
          if (lab_q == LABEL_W'(NUM_LABELS - 1)) begin
            label_q[nrn_q] <= fin_lab;      // stays unknown when every count is 0
            best_cnt_q     <= '0;
            best_lab_q     <= LABEL_UNKNOWN;
            lab_q          <= '0;
            nrn_q          <= nrn_q + 1'b1;
            if (32'(nrn_q) == NEURONS - 1) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end
          end else begin
            best_cnt_q <= fin_cnt;
            best_lab_q <= fin_lab;
            lab_q      <= lab_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
