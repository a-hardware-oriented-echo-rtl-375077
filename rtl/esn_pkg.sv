// esn_pkg: types and constants shared by the echo state network datapath.
//
// All signal values are 32-bit two's-complement fixed point with 16
// fractional bits (Q16.16). The 32-bit width follows the published design;
// the 16/16 split is this design's choice. Input and reservoir weights are
// ternary (0, +1, -1) and are stored as two bits {neg, pos}: 00 is 0,
// 01 is +1, 10 is -1 (11 is treated as 0 by the neuron circuit).
package esn_pkg;
  localparam int DATA_W = 32;
  localparam int FRAC_W = 16;

  typedef logic signed [DATA_W-1:0] fix_t;

  typedef enum logic [1:0] {
    TW_ZERO = 2'b00,
    TW_POS  = 2'b01,
    TW_NEG  = 2'b10
  } tern_e;
endpackage
