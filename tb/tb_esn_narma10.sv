// tb_esn_narma10: the NARMA10 benchmark on the ternary fixed-point network
// with one input, 500 reservoir neurons and one output.
//
// The series is
//   y(k+1) = 0.3 y(k) + 0.05 y(k) (y(k) + ... + y(k-9)) + 1.5 u(k-9) u(k) + 0.1
// with u(k) drawn uniformly from [0, 0.5]. The network is driven with u(k)
// and its state is recorded; W_out is trained by ridge regression on
// TRAIN steps (after a washout), loaded, and the network then predicts
// y(k+1) over TEST further steps, of which the last SCORE are scored.
// Passes if the normalised mean squared error (MSE over the variance of
// the target) is below 0.5 and every step takes N+3 clocks. The benchmark is
// usually run with 1000 neurons and 4000 training steps: set N and TRAIN
// for that (the run then takes many minutes of simulation).
module tb_esn_narma10;
  import esn_ref_pkg::*;
  localparam int M = 1, N = 500, L = 1, K = M + N, IW = $clog2(N);
  localparam int WASH = 100, TRAIN = 2000, TEST = 300, SCORE = 200;
  localparam int TOTAL = WASH + TRAIN + TEST;
  localparam real LAMBDA = 1.0e-3;
  localparam int  CONN = 1;          // mean nonzero reservoir weights per row

  logic clk = 0, rst_n = 0;
  logic tw_we = 0, ow_we = 0, state_clr = 0;
  logic [IW-1:0] tw_addr = '0, ow_addr = '0;
  logic [2*K-1:0] tw_wdata = '0;
  logic [L*32-1:0] ow_wdata = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  logic [M-1:0][31:0] u_in = '0;
  logic [L-1:0][31:0] z_out;

  esn_top #(.M(M), .N(N), .L(L)) dut (.*);
  always #5 clk = ~clk;

  real u [TOTAL];
  real y [TOTAL + 1];
  real X [N][TRAIN];   // recorded states, one row per neuron
  real A [N][N + 1];
  real wo [N];
  int checks = 0, failures = 0, bad_latency = 0;

  initial begin
    repeat (TOTAL * (N + 8) + 4 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q(real v);
    return longint'($floor(v * 65536.0 + 0.5));
  endfunction

  task automatic step(int k, output real z);
    int cyc;
    u_in[0] <= 32'(q(u[k]));
    in_valid <= 1;
    do @(posedge clk); while (!in_ready);
    in_valid <= 0;
    #1;
    cyc = 0;
    while (!out_valid && cyc < 4 * N) begin @(posedge clk); #1; cyc++; end
    if (cyc != N + 3) bad_latency++;
    z = q2r(sx32(z_out[0]));
    out_ready <= 1;
    @(posedge clk);
    out_ready <= 0;
  endtask

  initial begin
    real z, s, piv, f, mse, mean, var_y;
    int p, r;
    // the series
    for (int k = 0; k < TOTAL; k++) u[k] = 0.5 * real'($urandom_range(1000000)) / 1.0e6;
    for (int k = 0; k < TOTAL; k++) begin
      s = 0.0;
      for (int i = 0; i < 10; i++) s += (k - i >= 0) ? y[k - i] : 0.0;
      if (k == 0) y[0] = 0.0;
      y[k + 1] = 0.3 * y[k] + 0.05 * y[k] * s + 1.5 * ((k >= 9) ? u[k - 9] : 0.0) * u[k] + 0.1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ternary weights: input weights +1/-1/0, CONN reservoir weights per row on average
    for (int n = 0; n < N; n++) begin
      logic [2*K-1:0] row;
      for (int k = 0; k < K; k++) begin
        r = $urandom_range(N * 1000 - 1);
        if (k < M) row[2*k +: 2] = (r < N * 400) ? 2'b01 : (r < N * 800) ? 2'b10 : 2'b00;
        else       row[2*k +: 2] = (r < CONN * 500) ? 2'b01 : (r < CONN * 1000) ? 2'b10 : 2'b00;
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
    for (int k = 0; k < WASH + TRAIN; k++) begin
      step(k, z);
      if (k >= WASH)
        for (int n = 0; n < N; n++) X[n][k - WASH] = q2r(sx32(dut.u_state.x_cur[n]));
    end
    // ridge regression on the target y(k+1)
    for (int i = 0; i < N; i++) begin
      for (int j = i; j < N; j++) begin
        s = (i == j) ? LAMBDA : 0.0;
        for (int t = 0; t < TRAIN; t++) s += X[i][t] * X[j][t];
        A[i][j] = s;
        A[j][i] = s;
      end
      s = 0.0;
      for (int t = 0; t < TRAIN; t++) s += X[i][t] * y[WASH + t + 1];
      A[i][N] = s;
    end
    for (int c = 0; c < N; c++) begin
      p = c;
      for (int rr = c + 1; rr < N; rr++)
        if ((A[rr][c] < 0 ? -A[rr][c] : A[rr][c]) > (A[p][c] < 0 ? -A[p][c] : A[p][c])) p = rr;
      for (int j = c; j <= N; j++) begin f = A[c][j]; A[c][j] = A[p][j]; A[p][j] = f; end
      piv = A[c][c];
      for (int j = c; j <= N; j++) A[c][j] /= piv;
      for (int rr = 0; rr < N; rr++)
        if (rr != c && A[rr][c] != 0.0) begin
          f = A[rr][c];
          for (int j = c; j <= N; j++) A[rr][j] -= f * A[c][j];
        end
    end
    for (int n = 0; n < N; n++) begin
      wo[n] = A[n][N];
      ow_we <= 1; ow_addr <= IW'(n); ow_wdata <= 32'(q(wo[n]));
      @(posedge clk);
    end
    ow_we <= 0;
    // prediction
    mse = 0.0; mean = 0.0; var_y = 0.0;
    for (int k = WASH + TRAIN; k < TOTAL; k++) begin
      step(k, z);
      if (k >= TOTAL - SCORE) begin
        mse  += (z - y[k + 1]) ** 2;
        mean += y[k + 1];
      end
    end
    mean /= SCORE;
    for (int k = TOTAL - SCORE; k < TOTAL; k++) var_y += (y[k + 1] - mean) ** 2;
    mse /= SCORE;
    var_y /= SCORE;
    $display("NARMA10, %0d neurons: test MSE %e, NMSE %f", N, mse, mse / var_y);
    checks++;
    if (mse / var_y >= 0.5) begin failures++; $display("FAIL NMSE too high"); end
    checks++;
    if (bad_latency != 0) begin failures++; $display("FAIL %0d steps with wrong latency", bad_latency); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
