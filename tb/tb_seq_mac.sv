// tb_seq_mac: random product-sums of 100 terms against an integer model,
// including sums that saturate high and low (each partial sum is clipped),
// and clear between runs.
module tb_seq_mac;
  import esn_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic signed [31:0] x = '0, w = '0, z;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  seq_mac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 60; run++) begin
      clear <= 1; @(posedge clk); clear <= 0;
      acc = 0;
      for (int i = 0; i < 100; i++) begin
        case (run % 4)
          0: begin x <= $urandom; w <= $urandom; end                  // large: saturates
          1: begin x <= 32'h7FFF_0000; w <= 32'(-65536 * (1 + (i % 5))); end
          default: begin
            x <= 32'($signed($urandom_range(131072)) - 65536);
            w <= 32'($signed($urandom_range(1 << 20)) - (1 << 19));
          end
        endcase
        en <= ($urandom_range(3) != 0);
        @(posedge clk);
        if (en) acc = sat32(acc + prod_q(longint'(x), longint'(w)));
        #1;
        exp = sat32(acc);
        checks++;
        if (longint'(z) != exp) begin
          failures++;
          $display("FAIL run %0d i %0d got %0d expected %0d", run, i, z, exp);
        end
      end
      en <= 0;
      if (exp == 64'sd2147483647) sat_hi++;
      if (exp == -64'sd2147483648) sat_lo++;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
