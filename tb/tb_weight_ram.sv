// tb_weight_ram: fills the memory with random rows, reads them back in
// random order (data one clock after re), checks that rdata holds while re
// is low and that a write and a read of other rows can share a clock.
module tb_weight_ram;
  localparam int WIDTH = 204, DEPTH = 100, AW = 7;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [WIDTH-1:0] held;
    int a, b;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = rnd();
      we <= 1; waddr <= AW'(i); wdata <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int t = 0; t < 500; t++) begin
      a = $urandom_range(DEPTH - 1);
      b = $urandom_range(DEPTH - 1);
      re <= 1; raddr <= AW'(a);
      // write another row in the same clock
      if (b != a) begin
        model[b] = rnd();
        we <= 1; waddr <= AW'(b); wdata <= model[b];
      end
      @(posedge clk);
      re <= 0; we <= 0;
      #1 chk(model[a], "read");
      held = rdata;
      raddr <= AW'(b);
      @(posedge clk);
      #1 chk(held, "hold with re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
