// tb_tanh_pwl: sweeps the argument over [-6, 6] and random values; each
// result must equal the chord model bit for bit and lie within 0.0065 of
// tanh, and the function must be odd.
module tb_tanh_pwl;
  import esn_ref_pkg::*;
  logic signed [63:0] a;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  tanh_pwl dut (.a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint v);
    longint yp, exp;
    a = v; #1;
    yp = longint'(y);
    exp = tanh_q(v);
    checks++;
    if (yp != exp) begin
      failures++;
      $display("FAIL a=%0d got %0d expected %0d", v, yp, exp);
    end
    checks++;
    if (((q2r(yp) - $tanh(q2r(v))) < 0 ? -(q2r(yp) - $tanh(q2r(v))) : (q2r(yp) - $tanh(q2r(v)))) > 0.0065) begin
      failures++;
      $display("FAIL a=%f err %f", q2r(v), q2r(yp) - $tanh(q2r(v)));
    end
    a = -v; #1;
    checks++;
    if (longint'(y) != -yp) begin
      failures++;
      $display("FAIL odd a=%0d", v);
    end
  endtask

  initial begin
    for (longint v = -6 * 65536; v <= 6 * 65536; v += 97) one(v);
    for (int k = 0; k <= 11; k++) begin
      one(longint'(brk(k) * 65536.0));
      one(longint'(brk(k) * 65536.0) - 1);
    end
    for (int i = 0; i < 2000; i++) one(longint'($signed($urandom)) <<< ($urandom % 12));
    one(64'sd1 <<< 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
