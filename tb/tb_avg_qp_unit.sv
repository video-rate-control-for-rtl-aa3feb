// tb_avg_qp_unit: feeds two frames of 396 random MB QPs and checks TotalQP,
// No_MBs and AverageQP after every MB. AverageQP must be TotalQP/No_MBs whenever
// No_MBs is a power of two and hold its value otherwise, including across the
// frame boundary.
module tb_avg_qp_unit;
  import rc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, fs = 1'b0, mb_done = 1'b0;
  qp_t init_qp = 5'd12, mb_qp = '0, avg;
  logic [8:0] no_mbs;
  logic [13:0] total;
  int checks = 0, failures = 0;
  int rt, rn, ravg;

  avg_qp_unit dut (.clk, .rst_n, .init, .init_qp, .frame_start(fs), .mb_done, .mb_qp,
                   .avg_qp(avg), .no_mbs, .total_qp(total));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1; @(negedge clk); init = 1'b0;
    ravg = 12;
    checks++;
    if (avg != 5'd12) begin failures++; $display("FAIL init avg %0d", avg); end
    for (int f = 0; f < 2; f++) begin
      fs = 1'b1; @(negedge clk); fs = 1'b0;
      rt = 0; rn = 0;
      for (int m = 0; m < 396; m++) begin
        mb_qp = qp_t'(1 + $urandom % 31);
        mb_done = 1'b1; @(negedge clk); mb_done = 1'b0;
        rt += mb_qp; rn++;
        if ((rn & (rn - 1)) == 0) ravg = rt / rn;
        checks++;
        if (int'(total) != rt || int'(no_mbs) != rn || int'(avg) != ravg) begin
          failures++; $display("FAIL f%0d mb%0d total %0d/%0d n %0d avg %0d/%0d", f, m, total, rt, no_mbs, avg, ravg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
