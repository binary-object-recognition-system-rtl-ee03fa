// bsom_pkg: types and constants shared by the tri-state binary SOM (bSOM).
//
// A neuron weight bit is a "trit": 0, 1 or don't-care (#). A don't-care bit
// matches either input value when the Hamming distance is formed. The sizes
// below are the reference configuration: 40 neurons, 768-bit vectors
// (a 32x24 binary image), 10-bit distances, at most 9 object labels.
package bsom_pkg;

  localparam int unsigned LABEL_W        = 4;
  // Label code reported for a neuron that never won, or for an input whose
  // best distance is above the unknown threshold.
  localparam logic [LABEL_W-1:0] LABEL_UNKNOWN = '1;

  // Two-bit trit encoding; 2'b11 never stored, read back as don't-care.
  typedef enum logic [1:0] {
    TRIT_0  = 2'b00,
    TRIT_1  = 2'b01,
    TRIT_DC = 2'b10
  } trit_e;

  // What the engine does with each accepted pattern.
  typedef enum logic [1:0] {
    MODE_TRAIN = 2'd0,  // distance, WTA, neighbourhood update
    MODE_LABEL = 2'd1,  // distance, WTA, count win for the pattern's label
    MODE_RECOG = 2'd2   // distance, WTA, report label or unknown
  } mode_e;

  // True when weight trit w contributes 1 to the distance against input bit x.
  function automatic logic trit_mismatch(logic [1:0] w, logic x);
    return (w[1] == 1'b0) && (w[0] != x);
  endfunction

  // One step of the tri-state update rule towards input bit x:
  // equal -> kept, don't-care -> x, opposite -> don't-care.
  function automatic logic [1:0] trit_step(logic [1:0] w, logic x);
    if (w[1]) return {1'b0, x};
    else if (w[0] == x) return w;
    else return TRIT_DC;
  endfunction

endpackage
