// weight_ram: simple dual-port weight memory (one write port, one read port).
//
// The network keeps two of these: one holds the ternary input and reservoir
// weight row of every reservoir neuron (2*(M+N) bits per row), the other the
// L output weights that multiply each reservoir neuron (L*32 bits per row).
// A row is read whole, so one neuron's weights arrive in one clock. The
// weights are loaded through the write port by a host while the network is
// idle; that loading scheme is this design's choice.
//
// Interface: write when we is high (wdata at waddr on the clock edge); read
// when re is high, rdata valid on the following cycle and held otherwise.
// The array has no reset, as a block RAM.
module weight_ram #(
  parameter int WIDTH  = 204,
  parameter int DEPTH  = 100,
  parameter int ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
