// tb_esn_top: end-to-end test of the echo state network at its default
// size (2 inputs, 100 reservoir neurons, 2 outputs).
//
// Random ternary weights (dense input weights, sparse reservoir weights) and
// random output weights are loaded through the load ports; then sine/cosine
// input pairs are streamed. A reference model computes, from the network
// equations in integer arithmetic, every reservoir state and output; each
// z(t) and the stored state vector are compared bit for bit, and the time
// from input handshake to out_valid must be N+3 clocks. The run also
// exercises, and counts: output back-pressure stalls, readout overlapping
// the reservoir (MAC and row read active in the same clock), tanh
// saturation (bursts of large inputs), a state clear and a reload of the
// output weights between steps. A mechanism that never happened counts as
// a failure.
module tb_esn_top;
  import esn_ref_pkg::*;
  localparam int M = 2, N = 100, L = 2, K = M + N, IW = 7;
  localparam longint LEAK = 16384;
  localparam int STEPS = 80;

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

  logic [1:0] tw_m [N][K];
  longint     wo_m [L][N];
  longint     x_m  [N];
  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0, n_sat = 0, n_clear = 0, n_reload = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (dut.u_ctrl.rd_en && dut.u_ctrl.mac_en) n_overlap++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load_tern();
    for (int n = 0; n < N; n++) begin
      logic [2*K-1:0] row;
      for (int k = 0; k < K; k++) begin
        int r;
        r = $urandom_range(99);
        if (k < M) tw_m[n][k] = (r < 40) ? 2'b01 : (r < 80) ? 2'b10 : 2'b00;
        else       tw_m[n][k] = (r < 3) ? 2'b01 : (r < 6) ? 2'b10 : (r < 8) ? 2'b11 : 2'b00;
        row[2*k +: 2] = tw_m[n][k];
      end
      tw_we <= 1; tw_addr <= IW'(n); tw_wdata <= row;
      @(posedge clk);
    end
    tw_we <= 0;
  endtask

  task automatic load_out();
    for (int n = 0; n < N; n++) begin
      logic [L*32-1:0] row;
      for (int l = 0; l < L; l++) begin
        wo_m[l][n] = longint'($urandom_range(65536)) - 32768;   // [-0.5, 0.5]
        row[32*l +: 32] = 32'(wo_m[l][n]);
      end
      ow_we <= 1; ow_addr <= IW'(n); ow_wdata <= row;
      @(posedge clk);
    end
    ow_we <= 0;
  endtask

  // One reference time step; returns the outputs.
  task automatic ref_step(input longint u [M], output longint z [L]);
    longint xn [N];
    longint s, pre;
    for (int n = 0; n < N; n++) begin
      s = 0;
      for (int k = 0; k < K; k++)
        s += tval(tw_m[n][k]) * ((k < M) ? u[k] : x_m[k - M]);
      pre = leaky_q(x_m[n], s, LEAK);
      if (pre >= 4 * 65536 || pre <= -4 * 65536) n_sat++;
      xn[n] = tanh_q(pre);
    end
    x_m = xn;
    for (int l = 0; l < L; l++) begin
      z[l] = 0;
      for (int n = 0; n < N; n++) z[l] = sat32(z[l] + prod_q(x_m[n], wo_m[l][n]));
    end
  endtask

  initial begin
    longint u [M];
    longint zr [L];
    int cyc, hold;
    real amp;
    foreach (x_m[n]) x_m[n] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load_tern();
    load_out();
    for (int t = 0; t < STEPS; t++) begin
      // between steps: clear the state once, reload the output weights once
      if (t == 30) begin
        state_clr <= 1; @(posedge clk); state_clr <= 0;
        foreach (x_m[n]) x_m[n] = 0;
        n_clear++;
      end
      if (t == 50) begin load_out(); n_reload++; end
      amp = (t >= 20 && t < 25) ? 24.0 : 1.0;   // a burst that drives tanh into saturation
      u[0] = longint'($floor(amp * $sin(6.283185307179586 * t / 25.0) * 65536.0));
      u[1] = longint'($floor(amp * $cos(6.283185307179586 * t / 25.0) * 65536.0));
      ref_step(u, zr);
      for (int m = 0; m < M; m++) u_in[m] <= 32'(u[m]);
      in_valid <= 1;
      do @(posedge clk); while (!in_ready);
      in_valid <= 0;
      #1;
      cyc = 0;
      while (!out_valid && cyc < 4 * N) begin
        @(posedge clk); #1;
        cyc++;
      end
      chk(cyc == N + 3, $sformatf("step %0d latency %0d, expected %0d", t, cyc, N + 3));
      hold = $urandom_range(3);
      for (int h = 0; h < hold; h++) begin
        @(posedge clk); #1;
        chk(out_valid && !in_ready, "output held during stall");
        n_stall++;
      end
      for (int l = 0; l < L; l++)
        chk(sx32(z_out[l]) == zr[l],
            $sformatf("step %0d z[%0d] got %0d expected %0d", t, l, sx32(z_out[l]), zr[l]));
      for (int n = 0; n < N; n++)
        chk(sx32(dut.u_state.x_cur[n]) == x_m[n], $sformatf("step %0d x[%0d]", t, n));
      if (t % 20 == 0)
        $display("step %0d  u=(%f, %f)  z=(%f, %f)", t, q2r(u[0]), q2r(u[1]),
                 q2r(sx32(z_out[0])), q2r(sx32(z_out[1])));
      out_ready <= 1;
      @(posedge clk);
      out_ready <= 0;
    end
    $display("mechanisms: stall=%0d overlap=%0d tanh_sat=%0d clear=%0d reload=%0d",
             n_stall, n_overlap, n_sat, n_clear, n_reload);
    chk(n_stall > 0,   "stall never happened");
    chk(n_overlap > 0, "readout never overlapped the reservoir");
    chk(n_sat > 0,     "tanh saturation never happened");
    chk(n_clear > 0,   "state clear never happened");
    chk(n_reload > 0,  "weight reload never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
