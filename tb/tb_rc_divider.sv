// tb_rc_divider: self-checking test of the shared sequential divider.
// It runs random and edge-case divisions and compares quotient and remainder
// with the simulator's own / and %. It also checks the latency: done must come
// exactly WIDTH+1 cycles after start.
module tb_rc_divider;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic busy, done;
  logic [W-1:0] q, r;
  int checks = 0, failures = 0;

  rc_divider #(.WIDTH(W)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b),
                               .busy, .done, .quotient(q), .remainder(r));
  always #5 clk = ~clk;

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (y != 0 && (q != x / y || r != x % y)) begin
      failures++;
      $display("FAIL %0d/%0d got q=%0d r=%0d", x, y, q, r);
    end
    if (y == 0 && q != '1) begin failures++; $display("FAIL div by zero q=%h", q); end
    checks++;
    if (cyc != W + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'd100000, 32'd396);
    run(32'd5, 32'd7);
    run(32'hFFFF_FFFF, 32'd1);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(32'd123, 32'd0);
    for (int i = 0; i < 200; i++) run($urandom, ($urandom % 4 == 0) ? $urandom : ($urandom % 1000) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
