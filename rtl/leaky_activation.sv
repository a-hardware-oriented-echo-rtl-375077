// leaky_activation: leaky-integrator state update of one reservoir neuron.
//
// Implements the reservoir equation
//   x(t) = tanh( (1 - delta) * x(t-1) + delta * s ),
// where s = w_in*u(t) + w_res*x(t-1) comes from the ternary neuron circuit
// and delta (LEAK, Q16.16) is the leak rate. The two products with the
// constants are formed exactly in 64 bits, shifted right by 16 (rounding
// toward minus infinity) and passed through tanh_pwl. The equation is the
// published one; the value of delta and the rounding are this design's
// choices.
//
// Interface: sum and x_old are sampled when in_valid is high; x_new and
// out_valid follow one clock later.
module leaky_activation
  import esn_pkg::*;
#(
  parameter int          SUM_W = 39,
  parameter logic [31:0] LEAK  = 32'd16384   // delta = 0.25
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] sum,
  input  fix_t                    x_old,
  output logic                    out_valid,
  output fix_t                    x_new
);
  localparam longint ONE  = 64'sd1 << FRAC_W;        // 1.0 in Q16.16
  localparam longint KEEP = ONE - longint'(LEAK);   // 1 - delta
  localparam longint LK   = longint'(LEAK);

  logic signed [63:0] pre;
  fix_t               act;

  always_comb begin
    pre = (KEEP * 64'(x_old) + LK * 64'(sum)) >>> FRAC_W;
  end

  tanh_pwl #(.IN_W(64)) u_tanh (.a(pre), .y(act));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_new     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x_new <= act;
    end
  end
endmodule
