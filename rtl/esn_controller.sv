// esn_controller: sequencing of one echo-state-network time step.
//
// A time step starts when an input vector u(t) is accepted (in_valid and
// in_ready). The controller then issues the reservoir neurons 0..N-1, one
// per clock, into a four-stage pipeline:
//   stage 1  read the neuron's ternary weight row      (rd_en / rd_addr)
//   stage 2  ternary weighted sum                      (row_valid in, sum_valid back)
//   stage 3  leaky update and tanh, read output weights (wo_en / wo_addr / x_idx)
//   stage 4  store x_i and add w_out*x_i in every output MAC (st_we / mac_en)
// so the output layer works on neuron i while the reservoir computes the
// following ones. The write of the last neuron also commits x(t) as the new
// x(t-1), and z(t) is presented with out_valid N+3 clocks after the input
// handshake. It is held until out_ready; only then is the next input
// accepted, so a slow consumer stalls the network. The overlap of reservoir
// and readout follows the published design; the pipeline depth and the
// valid/ready handshakes are this design's choices.
module esn_controller #(
  parameter int N     = 100,
  parameter int IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // input stream
  input  logic             in_valid,
  output logic             in_ready,
  output logic             u_load,
  // output stream
  output logic             out_valid,
  input  logic             out_ready,
  // stage 1: ternary weight row read
  output logic             rd_en,
  output logic [IDX_W-1:0] rd_addr,
  // stage 2: ternary sum
  output logic             row_valid,
  input  logic             sum_valid,
  // stage 3: activation and output weight read
  output logic [IDX_W-1:0] x_idx,
  output logic             wo_en,
  output logic [IDX_W-1:0] wo_addr,
  input  logic             act_valid,
  // stage 4: state write, readout
  output logic             st_we,
  output logic [IDX_W-1:0] st_idx,
  output logic             commit,
  output logic             mac_clear,
  output logic             mac_en,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e           state;
  logic [IDX_W-1:0] cnt, i1, i2, i3;
  logic             accept, last;

  assign in_ready  = (state == S_IDLE);
  assign accept    = in_valid && in_ready;
  assign u_load    = accept;
  assign mac_clear = accept;
  assign out_valid = (state == S_DONE);
  assign busy      = (state != S_IDLE);

  assign rd_en     = (state == S_RUN);
  assign rd_addr   = cnt;
  assign x_idx     = i2;
  assign wo_en     = sum_valid;
  assign wo_addr   = i2;
  assign st_we     = act_valid;
  assign st_idx    = i3;
  assign mac_en    = act_valid;
  assign last      = act_valid && (int'(i3) == N - 1);
  assign commit    = last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      row_valid <= 1'b0;
      i1        <= '0;
      i2        <= '0;
      i3        <= '0;
    end else begin
      row_valid <= rd_en;
      if (rd_en)     i1 <= rd_addr;
      if (row_valid) i2 <= i1;
      if (sum_valid) i3 <= i2;
      unique case (state)
        S_IDLE:  if (accept) begin
                   state <= S_RUN;
                   cnt   <= '0;
                 end
        S_RUN:   begin
                   cnt <= cnt + 1'b1;
                   if (int'(cnt) == N - 1) state <= S_DRAIN;
                 end
        S_DRAIN: if (last) state <= S_DONE;
        S_DONE:  if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // z(t) is held until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid);
  // No new input while a step is in progress.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy |-> !in_ready);
endmodule
