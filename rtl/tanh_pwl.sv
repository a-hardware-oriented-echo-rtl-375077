// tanh_pwl: hyperbolic tangent activation in fixed point.
//
// The reservoir uses tanh as its activation. This unit approximates it by
// straight chords between the breakpoints A = 0, 0.25, ..., 2.0, 2.5, 3.0,
// 4.0 (11 segments) and saturates at tanh(4) beyond |a| = 4. The function
// is odd, so the magnitude is evaluated and the sign restored afterwards.
// Table constants (Q16.16): Y_k = round(tanh(A_k) * 2^16) and the chord
// slopes S_k = round((Y_{k+1} - Y_k) / (A_{k+1} - A_k)). The largest error
// against tanh is about 0.006. The choice of approximation is this design's
// own; the published design only names tanh.
//
// Interface: purely combinational. a is signed with 16 fractional bits and
// IN_W bits in all; y is Q16.16.
module tanh_pwl
  import esn_pkg::*;
#(
  parameter int IN_W = 64
) (
  input  logic signed [IN_W-1:0] a,
  output fix_t                   y
);
  localparam int NSEG = 11;
  localparam logic [31:0] BRK [NSEG+1] = '{
    32'd0,     32'd16384, 32'd32768, 32'd49152, 32'd65536, 32'd81920,
    32'd98304, 32'd114688, 32'd131072, 32'd163840, 32'd196608, 32'd262144 };
  localparam logic [31:0] YV [NSEG+1] = '{
    32'd0,     32'd16051, 32'd30285, 32'd41625, 32'd49912, 32'd55593,
    32'd59320, 32'd61694, 32'd63179, 32'd64659, 32'd65212, 32'd65492 };
  localparam logic [31:0] SLOPE [NSEG] = '{
    32'd64204, 32'd56936, 32'd45360, 32'd33148, 32'd22724, 32'd14908,
    32'd9496,  32'd5940,  32'd2960,  32'd1106,  32'd280 };

  logic              neg;
  logic [IN_W-1:0]   mag;
  logic [31:0]       ymag;

  always_comb begin
    logic [63:0] prod;
    logic [31:0] dx;
    logic [3:0]  seg;
    neg = a[IN_W-1];
    mag = neg ? IN_W'(-a) : IN_W'(a);
    seg = 0;
    for (int k = 1; k < NSEG; k++)
      if (mag >= IN_W'(BRK[k])) seg = 4'(k);
    if (mag >= IN_W'(BRK[NSEG])) begin
      ymag = YV[NSEG];
      dx   = '0;
      prod = '0;
    end else begin
      dx   = 32'(mag) - BRK[seg];
      prod = 64'(SLOPE[seg]) * 64'(dx);
      ymag = YV[seg] + 32'(prod >> FRAC_W);
    end
    y = neg ? -fix_t'(ymag) : fix_t'(ymag);
  end
endmodule
