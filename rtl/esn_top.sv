// esn_top: hardware echo state network with ternary reservoir weights.
//
// The network has M inputs, N reservoir neurons and L outputs and computes,
// once per input vector u(t),
//   x(t) = tanh((1 - delta) x(t-1) + delta (W_in u(t) + W_res x(t-1)))
//   z(t) = W_out x(t)
// in Q16.16 fixed point. W_in and W_res are ternary (0, +1, -1) so the
// reservoir needs no multipliers; one reservoir neuron is evaluated per
// clock, and the readout is folded in as the states appear: each output has
// one sequential multiply-accumulate unit. A step takes N+3 clocks from the
// input handshake to out_valid. Trained output weights (ridge regression,
// done off-line) and the random ternary weights are written by a host
// through the two load ports while busy is low.
//
// The ternary weights, fixed point, sequential readout and the sizes
// M=2, N=100, L=2 follow the published design. The leak rate (0.25), the
// tanh approximation, the handshakes and the weight-load ports are this
// design's choices.
//
// Ports:
//   tw_*      write ternary row tw_addr: tw_wdata[2k+1:2k] is the weight of
//             input k of the neuron, k < M for u, k >= M for x[k-M]
//   ow_*      write output weights of reservoir neuron ow_addr: word l is
//             w_out[l][ow_addr]
//   state_clr sets x to 0 (use while idle)
//   in_*      u(t), valid/ready;  out_*  z(t), valid/ready
module esn_top
  import esn_pkg::*;
#(
  parameter int          M     = 2,
  parameter int          N     = 100,
  parameter int          L     = 2,
  parameter logic [31:0] LEAK  = 32'd16384,
  localparam int         K     = M + N,
  localparam int         IDX_W = (N > 1) ? $clog2(N) : 1,
  localparam int         SUM_W = DATA_W + $clog2(K + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tw_we,
  input  logic [IDX_W-1:0]         tw_addr,
  input  logic [2*K-1:0]           tw_wdata,
  input  logic                     ow_we,
  input  logic [IDX_W-1:0]         ow_addr,
  input  logic [L*DATA_W-1:0]      ow_wdata,
  input  logic                     state_clr,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [M-1:0][DATA_W-1:0] u_in,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [L-1:0][DATA_W-1:0] z_out,
  output logic                     busy
);
  logic                     u_load, rd_en, row_valid, sum_valid, act_valid;
  logic                     wo_en, st_we, commit, mac_clear, mac_en;
  logic [IDX_W-1:0]         rd_addr, x_idx, wo_addr, st_idx;
  logic [M-1:0][DATA_W-1:0] u_q;
  logic [N-1:0][DATA_W-1:0] x_cur;
  logic [K-1:0][DATA_W-1:0] vec;
  logic [2*K-1:0]           trow;
  logic [K-1:0][1:0]        tw;
  logic [L*DATA_W-1:0]      orow;
  logic [L-1:0][DATA_W-1:0] ow;
  logic signed [SUM_W-1:0]  sum;
  fix_t                     x_new;

  esn_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .u_load, .out_valid, .out_ready,
    .rd_en, .rd_addr, .row_valid, .sum_valid, .x_idx, .wo_en, .wo_addr,
    .act_valid, .st_we, .st_idx, .commit, .mac_clear, .mac_en, .busy);

  always_ff @(posedge clk) begin
    if (!rst_n)      u_q <= '0;
    else if (u_load) u_q <= u_in;
  end

  weight_ram #(.WIDTH(2*K), .DEPTH(N)) u_tern_ram (
    .clk, .we(tw_we), .waddr(tw_addr), .wdata(tw_wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(trow));

  weight_ram #(.WIDTH(L*DATA_W), .DEPTH(N)) u_out_ram (
    .clk, .we(ow_we), .waddr(ow_addr), .wdata(ow_wdata),
    .re(wo_en), .raddr(wo_addr), .rdata(orow));

  assign vec = {x_cur, u_q};
  assign tw  = trow;
  assign ow  = orow;

  ternary_neuron #(.K(K), .SUM_W(SUM_W)) u_neuron (
    .clk, .rst_n, .in_valid(row_valid), .vec, .w(tw),
    .out_valid(sum_valid), .sum);

  leaky_activation #(.SUM_W(SUM_W), .LEAK(LEAK)) u_act (
    .clk, .rst_n, .in_valid(sum_valid), .sum, .x_old(fix_t'(x_cur[x_idx])),
    .out_valid(act_valid), .x_new);

  state_buffer #(.N(N)) u_state (
    .clk, .rst_n, .clr(state_clr), .wr_en(st_we), .wr_idx(st_idx),
    .wr_data(x_new), .commit, .x_cur);

  output_layer #(.L(L)) u_out (
    .clk, .rst_n, .clear(mac_clear), .en(mac_en), .x(x_new), .w(ow),
    .z(z_out));
endmodule
