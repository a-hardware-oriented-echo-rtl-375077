// seq_mac: sequential product-sum of one output neuron.
//
// Instead of an adder tree over all reservoir neurons, the output neuron
// owns a single multiplier, adder and accumulator register:
//   A_i = A_{i-1} + w_i * x_i,
// taking one reservoir state x_i per enabled clock. This structure is the
// published one. Each Q16.16 x Q16.16 product is formed in 64 bits and
// shifted right by 16 (floor); every partial sum is saturated to the 32-bit
// range, so A never wraps and stays at the limit once a sum runs past it.
// The rounding and the saturation are this design's choices.
//
// Interface: clear sets A to 0 (and wins over en); en adds w*x on the clock
// edge. z is the accumulator register itself.
module seq_mac
  import esn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  fix_t x,
  input  fix_t w,
  output fix_t z
);
  localparam longint ZMAX = 64'sh0000_0000_7FFF_FFFF;
  localparam longint ZMIN = -64'sh0000_0000_8000_0000;

  fix_t   acc;
  longint nxt;

  always_comb begin
    nxt = 64'(acc) + ((64'(x) * 64'(w)) >>> FRAC_W);
    if (nxt > ZMAX)      nxt = ZMAX;
    else if (nxt < ZMIN) nxt = ZMIN;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) acc <= '0;
    else if (en)         acc <= fix_t'(nxt);
  end

  assign z = acc;
endmodule
