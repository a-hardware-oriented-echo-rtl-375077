// tb_esn_controller: the controller with a two-register stand-in for the
// neuron and activation stages. Checks per time step: rows 0..N-1 issued on
// consecutive clocks, the output-weight address and state write index of
// every neuron, one commit with the last write, out_valid exactly N+3
// clocks after the input handshake, and that out_valid holds and no input is
// accepted while out_ready is low.
module tb_esn_controller;
  localparam int N = 100, IW = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, u_load, out_valid, out_ready = 0;
  logic rd_en, row_valid, sum_valid = 0, act_valid = 0, wo_en, st_we, commit;
  logic mac_clear, mac_en, busy;
  logic [IW-1:0] rd_addr, x_idx, wo_addr, st_idx;
  int checks = 0, failures = 0, stalls = 0;

  esn_controller #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  // stand-in for the datapath stages: one clock each
  always_ff @(posedge clk) begin
    sum_valid <= row_valid;
    act_valid <= sum_valid;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int cyc, nrd, nwo, nst, ncommit, hold;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int step = 0; step < 12; step++) begin
      repeat ($urandom_range(3)) @(posedge clk);
      in_valid <= 1;
      do @(posedge clk); while (!(in_valid && in_ready));
      in_valid <= 0;
      #1;
      cyc = 0; nrd = 0; nwo = 0; nst = 0; ncommit = 0;
      while (!out_valid) begin
        chk(!in_ready, "in_ready while busy");
        if (rd_en)  begin chk(int'(rd_addr) == nrd, "row order"); chk(cyc == nrd, "rows back to back"); nrd++; end
        if (wo_en)  begin chk(int'(wo_addr) == nwo && x_idx == wo_addr, "output weight index"); nwo++; end
        if (st_we)  begin chk(int'(st_idx) == nst, "state index"); nst++; end
        if (commit) begin chk(st_we && int'(st_idx) == N - 1, "commit with last write"); ncommit++; end
        chk(mac_en == st_we, "mac_en with state write");
        @(posedge clk); #1;
        cyc++;
        if (cyc > 4 * N) break;
      end
      chk(cyc == N + 3, $sformatf("latency %0d, expected %0d", cyc, N + 3));
      chk(nrd == N && nwo == N && nst == N && ncommit == 1, "counts per step");
      // back-pressure: hold out_ready low for a while
      hold = (step % 3 == 0) ? 5 : 0;
      for (int h = 0; h < hold; h++) begin
        in_valid <= 1;
        @(posedge clk); #1;
        chk(out_valid && !in_ready && busy, "stall holds output");
        stalls++;
      end
      in_valid <= 0;
      out_ready <= 1;
      @(posedge clk);
      out_ready <= 0;
      #1 chk(!out_valid && in_ready, "output taken");
    end
    chk(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
