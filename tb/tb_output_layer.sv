// tb_output_layer: feeds 100 states with per-output weights and compares
// every output with its own integer dot product each clock.
module tb_output_layer;
  import esn_ref_pkg::*;
  localparam int L = 2;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic signed [31:0] x = '0;
  logic [L-1:0][31:0] w = '0, z;
  int checks = 0, failures = 0;

  output_layer #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc [L];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 30; run++) begin
      clear <= 1; @(posedge clk); clear <= 0;
      foreach (acc[l]) acc[l] = 0;
      for (int i = 0; i < 100; i++) begin
        x <= 32'($signed($urandom_range(131072)) - 65536);
        for (int l = 0; l < L; l++) w[l] <= 32'($signed($urandom_range(1 << 22)) - (1 << 21));
        en <= 1;
        @(posedge clk);
        for (int l = 0; l < L; l++) acc[l] = sat32(acc[l] + prod_q(longint'(x), sx32(w[l])));
        #1;
        for (int l = 0; l < L; l++) begin
          checks++;
          if (sx32(z[l]) != sat32(acc[l])) begin
            failures++;
            $display("FAIL out %0d got %0d expected %0d", l, sx32(z[l]), sat32(acc[l]));
          end
        end
      end
      en <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
