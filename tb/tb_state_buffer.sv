// tb_state_buffer: x_cur must keep x(t-1) while new states are written,
// take all of them (including one written in the commit clock) on commit,
// and return to 0 on clr.
module tb_state_buffer;
  localparam int N = 100, IW = 7;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, commit = 0;
  logic [IW-1:0] wr_idx = '0;
  logic signed [31:0] wr_data = '0;
  logic [N-1:0][31:0] x_cur;
  logic [N-1:0][31:0] cur_m, nxt_m;
  int checks = 0, failures = 0;

  state_buffer #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (x_cur !== cur_m) begin failures++; if (failures < 4) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    cur_m = '0; nxt_m = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1 chk("after reset");
    for (int step = 0; step < 20; step++) begin
      for (int i = 0; i < N; i++) begin
        wr_en <= 1; wr_idx <= IW'(i); wr_data <= $urandom;
        commit <= (i == N - 1);
        @(posedge clk);
        nxt_m[i] = wr_data;
        if (i == N - 1) cur_m = nxt_m;
        #1 chk("during step");
      end
      // a commit with no write copies x(t) again, unchanged
      if (step == 3) begin
        wr_en <= 0; commit <= 1; @(posedge clk); commit <= 0; #1 chk("bare commit");
      end
      if (step == 10) begin
        wr_en <= 0; commit <= 0; clr <= 1; @(posedge clk); clr <= 0;
        cur_m = '0; nxt_m = '0;
        #1 chk("clr");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
