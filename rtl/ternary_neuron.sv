// ternary_neuron: weighted sum of one reservoir neuron with ternary weights.
//
// Computes  sum = SUM_k w[k] * vec[k]  for K inputs (the network inputs u
// followed by the previous reservoir states x(t-1)) where each weight is 0,
// +1 or -1. No multiplier is used: every term is formed by gating,
//   term_k = (v_k AND pos_k) OR (NOT v_k AND neg_k),
// which is v_k, its ones' complement or zero, and the "+1" that completes
// each two's-complement negation is added once as the number of negative
// weights. The gating follows the multiplier-free neuron of the published
// design; the single-cycle adder and its output register are this design's
// choice.
//
// Interface: vec and w are sampled when in_valid is high; sum and out_valid
// appear on the next clock edge (latency 1, one neuron per clock). sum is in
// the same Q16.16 scale as vec and is SUM_W bits wide, which cannot overflow.
module ternary_neuron
  import esn_pkg::*;
#(
  parameter int K     = 102,
  parameter int SUM_W = DATA_W + $clog2(K + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [K-1:0][DATA_W-1:0]       vec,
  input  logic [K-1:0][1:0]              w,
  output logic                           out_valid,
  output logic signed [SUM_W-1:0]        sum
);
  logic signed [SUM_W-1:0] acc;

  always_comb begin
    logic signed [SUM_W-1:0] ext;
    acc = '0;
    for (int k = 0; k < K; k++) begin
      ext = SUM_W'(signed'(vec[k]));
      acc = acc + (({SUM_W{w[k][0]}} & ext) | ({SUM_W{w[k][1]}} & ~ext))
                + SUM_W'(w[k][1]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= acc;
    end
  end
endmodule
