// tb_ternary_neuron: random operand sets against an integer weighted sum;
// checks the one-clock latency and the 11 code (read as 0).
module tb_ternary_neuron;
  import esn_ref_pkg::*;
  localparam int K = 102;
  localparam int SUM_W = 32 + $clog2(K + 1);
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [K-1:0][31:0] vec;
  logic [K-1:0][1:0]  w;
  logic signed [SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  ternary_neuron #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint ref_sum;
    vec = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      ref_sum = 0;
      for (int k = 0; k < K; k++) begin
        case (t % 3)
          0: vec[k] = $urandom;                                  // full range
          1: vec[k] = 32'($signed($urandom_range(131072)) - 65536); // [-1, 1]
          default: vec[k] = (k % 2) ? 32'h8000_0000 : 32'h7FFF_FFFF; // extremes
        endcase
        w[k] = 2'($urandom);
        if (t == 5) w[k] = 2'b10;        // all negative
        if (t == 6) w[k] = 2'b01;        // all positive
        ref_sum += tval(w[k]) * sx32(vec[k]);
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      check("valid", longint'(out_valid), 1);
      check("sum", longint'(sum), ref_sum);
      @(posedge clk);
      #1;
      check("valid drop", longint'(out_valid), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
