// tb_leaky_activation: random states and sums (small, and large enough to
// saturate tanh) against the reference update; checks the one-clock latency.
module tb_leaky_activation;
  import esn_ref_pkg::*;
  localparam int SUM_W = 39;
  localparam longint LEAK = 16384;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [SUM_W-1:0] sum;
  logic signed [31:0] x_old, x_new;
  int checks = 0, failures = 0, saturated = 0;

  leaky_activation #(.SUM_W(SUM_W), .LEAK(32'(LEAK))) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, xo, pre, exp;
    sum = '0; x_old = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      xo = longint'($urandom_range(131072)) - 65536;
      case (t % 3)
        0: s = longint'($urandom_range(262144)) - 131072;
        1: s = longint'($urandom_range(2000000)) - 1000000;
        default: s = (longint'($signed($urandom)) <<< 6);
      endcase
      pre = leaky_q(xo, s, LEAK);
      exp = tanh_q(pre);
      if (pre >= 4 * 65536 || pre <= -4 * 65536) saturated++;
      sum <= SUM_W'(s); x_old <= 32'(xo); in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || longint'(x_new) != exp) begin
        failures++;
        $display("FAIL x_old=%0d s=%0d got %0d expected %0d", xo, s, x_new, exp);
      end
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL no saturation case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
