// echo_nn_pkg -- shared sizes and types of the sonar object recogniser.
//
// The network is a single-layer perceptron: 60 neurons (four objects times
// 15 distance zones) read a 256-sample sonar amplitude vector. Weights and
// biases are trained off-chip and arrive as integers scaled by 1000 (a real
// weight of -0.437 arrives as magnitude 437 with the sign flag set). These
// numbers, and one small processor per neuron (N_LANES = 60), follow the
// design description; the 16-bit value width, the 16-bit host wires and the
// matrix-select encoding are choices of this implementation.
package echo_nn_pkg;

  localparam int unsigned N_OBJECTS        = 4;    // objects A..D
  localparam int unsigned ZONES_PER_OBJECT = 15;   // distance zones per object
  localparam int unsigned N_NEURONS        = N_OBJECTS * ZONES_PER_OBJECT;  // 60
  localparam int unsigned N_SAMPLES        = 256;  // amplitude samples per echo
  localparam int unsigned N_LANES          = 60;   // neurons computed side by side
  localparam int unsigned VALUE_W          = 16;   // stored two's-complement width
  localparam int unsigned WIRE_W           = 16;   // width of one host wire

  // Which one-dimensional array a host transfer is aimed at.
  typedef enum logic [1:0] {
    TGT_WEIGHT = 2'd0,
    TGT_BIAS   = 2'd1,
    TGT_INPUT  = 2'd2,
    TGT_NONE   = 2'd3
  } target_e;

endpackage
