// output_layer: the readout z(t) = w_out * x(t), computed as states arrive.
//
// One seq_mac per output neuron, all fed the same reservoir state x_i in
// the same clock with their own weight w_out[l][i]. Because the reservoir
// hands over one new state per clock, the readout finishes one clock after
// the last reservoir neuron instead of needing a pass of its own. This
// parallel arrangement follows the published design.
//
// Interface: clear starts a time step; en marks a valid (x, w) pair. z[l]
// is valid one clock after the last enabled pair.
module output_layer
  import esn_pkg::*;
#(
  parameter int L = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  fix_t                     x,
  input  logic [L-1:0][DATA_W-1:0] w,
  output logic [L-1:0][DATA_W-1:0] z
);
  for (genvar l = 0; l < L; l++) begin : g_mac
    fix_t zl;
    seq_mac u_mac (
      .clk(clk), .rst_n(rst_n), .clear(clear), .en(en),
      .x(x), .w(fix_t'(w[l])), .z(zl));
    assign z[l] = zl;
  end
endmodule
