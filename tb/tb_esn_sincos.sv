// tb_esn_sincos: sine/cosine prediction with the default 2-100-2 network.
//
// The input is u(t) = (sin(w t), cos(w t)) with a period of 25 steps and the
// target is the next sample, u(t+1). Ternary input weights are dense and
// reservoir weights sparse (random, fixed seed stream). The testbench acts
// as the host:
//   1. runs 50 washout steps and 300 training steps with W_out = 0 and
//      records the state vector x(t) after every step;
//   2. trains W_out by ridge regression, W_out = (X'X + lambda I)^-1 X'Y,
//      in double precision (Gaussian elimination), and loads it in Q16.16;
//   3. runs 100 more steps and compares z(t) with the target.
// Passes if the test mean squared error is below 1e-3 per output and every
// step takes N+3 clocks from input handshake to out_valid.
module tb_esn_sincos;
  import esn_ref_pkg::*;
  localparam int M = 2, N = 100, L = 2, K = M + N, IW = 7;
  localparam int WASH = 50, TRAIN = 300, TEST = 100;
  localparam real W = 6.283185307179586 / 25.0;
  localparam real LAMBDA = 1.0e-4;

  logic clk = 0, rst_n = 0;
  logic tw_we = 0, ow_we = 0, state_clr = 0;
  logic [IW-1:0] tw_addr = '0, ow_addr = '0;
  logic [2*K-1:0] tw_wdata = '0;
  logic [L*32-1:0] ow_wdata = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  logic [M-1:0][31:0] u_in = '0;
  logic [L-1:0][31:0] z_out;

  esn_top dut (.*);
  always #5 clk = ~clk;

  real X [TRAIN][N];
  real Y [TRAIN][L];
  real A [N][N + L];
  real wo [L][N];
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic longint q(real v);
    return longint'($floor(v * 65536.0 + 0.5));
  endfunction

  // One network step on input index t; returns z(t).
  task automatic step(int t, output real z [L]);
    int cyc;
    u_in[0] <= 32'(q($sin(W * t)));
    u_in[1] <= 32'(q($cos(W * t)));
    in_valid <= 1;
    do @(posedge clk); while (!in_ready);
    in_valid <= 0;
    #1;
    cyc = 0;
    while (!out_valid && cyc < 4 * N) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != N + 3) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int l = 0; l < L; l++) z[l] = q2r(sx32(z_out[l]));
    out_ready <= 1;
    @(posedge clk);
    out_ready <= 0;
  endtask

  initial begin
    real z [L];
    real err [L];
    real piv, f;
    int p;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ternary weights: inputs dense (80 % nonzero), reservoir about 1 % nonzero
    for (int n = 0; n < N; n++) begin
      logic [2*K-1:0] row;
      for (int k = 0; k < K; k++) begin
        int r;
        r = $urandom_range(999);
        if (k < M) row[2*k +: 2] = (r < 400) ? 2'b01 : (r < 800) ? 2'b10 : 2'b00;
        else       row[2*k +: 2] = (r < 5) ? 2'b01 : (r < 10) ? 2'b10 : 2'b00;
      end
      tw_we <= 1; tw_addr <= IW'(n); tw_wdata <= row;
      @(posedge clk);
    end
    tw_we <= 0;
    for (int n = 0; n < N; n++) begin
      ow_we <= 1; ow_addr <= IW'(n); ow_wdata <= '0;
      @(posedge clk);
    end
    ow_we <= 0;

    // 1. washout and state collection
    for (int t = 0; t < WASH + TRAIN; t++) begin
      step(t, z);
      if (t >= WASH) begin
        for (int n = 0; n < N; n++) X[t - WASH][n] = q2r(sx32(dut.u_state.x_cur[n]));
        Y[t - WASH][0] = $sin(W * (t + 1));
        Y[t - WASH][1] = $cos(W * (t + 1));
      end
    end

    // 2. ridge regression: [X'X + lambda I | X'Y], solved by elimination
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        A[i][j] = (i == j) ? LAMBDA : 0.0;
        for (int t = 0; t < TRAIN; t++) A[i][j] += X[t][i] * X[t][j];
      end
      for (int l = 0; l < L; l++) begin
        A[i][N + l] = 0.0;
        for (int t = 0; t < TRAIN; t++) A[i][N + l] += X[t][i] * Y[t][l];
      end
    end
    for (int c = 0; c < N; c++) begin
      p = c;
      for (int r = c + 1; r < N; r++)
        if ((A[r][c] < 0 ? -A[r][c] : A[r][c]) > (A[p][c] < 0 ? -A[p][c] : A[p][c])) p = r;
      for (int j = 0; j < N + L; j++) begin f = A[c][j]; A[c][j] = A[p][j]; A[p][j] = f; end
      piv = A[c][c];
      for (int r = 0; r < N; r++)
        if (r != c) begin
          f = A[r][c] / piv;
          for (int j = c; j < N + L; j++) A[r][j] -= f * A[c][j];
        end
    end
    for (int n = 0; n < N; n++) begin
      logic [L*32-1:0] row;
      for (int l = 0; l < L; l++) begin
        wo[l][n] = A[n][N + l] / A[n][n];
        row[32*l +: 32] = 32'(q(wo[l][n]));
      end
      ow_we <= 1; ow_addr <= IW'(n); ow_wdata <= row;
      @(posedge clk);
    end
    ow_we <= 0;
    begin
      real tr, mx;
      tr = 0.0; mx = 0.0;
      for (int t = 0; t < TRAIN; t++) begin
        f = 0.0;
        for (int n = 0; n < N; n++) f += wo[1][n] * X[t][n];
        tr += (f - Y[t][1]) ** 2;
      end
      for (int n = 0; n < N; n++) for (int l = 0; l < L; l++) if ((wo[l][n] < 0 ? -wo[l][n] : wo[l][n]) > mx) mx = (wo[l][n] < 0 ? -wo[l][n] : wo[l][n]);
      $display("training MSE (out 1) %e, largest weight %f", tr / TRAIN, mx);
    end

    // 3. prediction
    foreach (err[l]) err[l] = 0.0;
    for (int t = WASH + TRAIN; t < WASH + TRAIN + TEST; t++) begin
      step(t, z);
      err[0] += (z[0] - $sin(W * (t + 1))) ** 2;
      err[1] += (z[1] - $cos(W * (t + 1))) ** 2;
      if (t % 20 == 0)
        $display("t=%0d  z=(%f, %f)  target=(%f, %f)", t, z[0], z[1], $sin(W * (t + 1)), $cos(W * (t + 1)));
    end
    for (int l = 0; l < L; l++) begin
      err[l] /= TEST;
      $display("output %0d: test MSE %e", l, err[l]);
      chk(err[l] < 1.0e-3, $sformatf("MSE of output %0d is %e", l, err[l]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
