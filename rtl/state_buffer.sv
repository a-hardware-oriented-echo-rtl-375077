// state_buffer: storage of the reservoir state vector.
//
// Every reservoir neuron reads the complete previous state x(t-1), while the
// new states x(t) are produced one neuron per clock. The buffer therefore
// holds two register copies: x_cur (x(t-1), presented in parallel on the
// output for the whole time step) and x_nxt (x(t), written one entry at a
// time). commit copies x_nxt over x_cur at the end of a step; a write in
// the commit cycle is included in the copy. Register storage and the
// two-copy scheme are this design's choice.
//
// Interface: reset or clr sets every state to 0 (clr takes precedence over
// a write). wr_en writes wr_data at wr_idx on the clock edge.
module state_buffer
  import esn_pkg::*;
#(
  parameter int N     = 100,
  parameter int IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   wr_en,
  input  logic [IDX_W-1:0]       wr_idx,
  input  fix_t                   wr_data,
  input  logic                   commit,
  output logic [N-1:0][DATA_W-1:0] x_cur
);
  logic [N-1:0][DATA_W-1:0] x_nxt;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      x_cur <= '0;
      x_nxt <= '0;
    end else begin
      for (int k = 0; k < N; k++) begin
        if (wr_en && int'(wr_idx) == k) begin
          x_nxt[k] <= wr_data;
          if (commit) x_cur[k] <= wr_data;
        end else if (commit) begin
          x_cur[k] <= x_nxt[k];
        end
      end
    end
  end
endmodule
