// nn_pkg: sizes, number formats and shared types of the shape-recognition
// neural network (a 16-32-4 multi-layer perceptron).
//
// Layer sizes, ROM word lengths and the 2-bit result code follow the
// published architecture. The input word width, the accumulator widths,
// the scaling that turns a hidden-layer sum into a ROM3 address and the
// order of the shape codes are choices of this implementation.
package nn_pkg;

  // Network topology
  localparam int unsigned N_IN  = 16;   // input neurons (chain-code slopes)
  localparam int unsigned N_HID = 32;   // hidden neurons, tan-sigmoid
  localparam int unsigned N_OUT = 4;    // output neurons, one per shape

  // Word lengths
  localparam int unsigned X_W    = 8;   // input sample, signed
  localparam int unsigned W1_W   = 12;  // ROM1 weight, signed
  localparam int unsigned W2_W   = 8;   // ROM2 weight, signed
  localparam int unsigned ACT_AW = 8;   // ROM3 address (256 entries)
  localparam int unsigned ACT_W  = 8;   // ROM3 data, signed tanh value

  // Accumulators: product width plus log2 of (terms + bias), rounded up
  localparam int unsigned ACC1_W = X_W + W1_W + $clog2(N_IN + 1);    // 25
  localparam int unsigned ACC2_W = ACT_W + W2_W + $clog2(N_HID + 1); // 22

  // Hidden sum -> ROM3 address: arithmetic shift right by ACT_SHIFT,
  // saturate to a signed ACT_AW-bit value, then offset to 0..255.
  localparam int unsigned ACT_SHIFT = 12;

  localparam int unsigned CLASS_W = 2;

  // Shape codes in the order the shapes are listed
  typedef enum logic [CLASS_W-1:0] {
    SHAPE_SQUARE    = 2'd0,
    SHAPE_CIRCLE    = 2'd1,
    SHAPE_RECTANGLE = 2'd2,
    SHAPE_TRIANGLE  = 2'd3
  } shape_e;

  // Controller phases
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for start
    ST_LOAD,   // MACs load their bias
    ST_L1,     // hidden layer: 16 inputs + 1 pipeline cycle
    ST_ACT,    // 32 parallel ROM3 look-ups
    ST_L2,     // output layer: 32 inputs + 1 pipeline cycle
    ST_MAX     // maximum of the 4 output sums
  } nn_state_e;

  typedef logic signed [X_W-1:0]    x_t;
  typedef logic signed [W1_W-1:0]   w1_t;
  typedef logic signed [W2_W-1:0]   w2_t;
  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [ACC1_W-1:0] acc1_t;
  typedef logic signed [ACC2_W-1:0] acc2_t;

  // Cycles from an accepted start to the result being valid:
  // load + (N_IN+1) + activation + (N_HID+1) + max
  localparam int unsigned LATENCY = 1 + (N_IN + 1) + 1 + (N_HID + 1) + 1;

endpackage
