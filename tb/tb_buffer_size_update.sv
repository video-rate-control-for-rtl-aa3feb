// tb_buffer_size_update: checks the decoder-buffer model and frame targets.
// A reference model in the testbench tracks V0 = N*B/F*(1-w), V' = V-K+B/F and
// the P and I targets for a random sequence of frame sizes. The outputs must match
// it after every frame.
module tb_buffer_size_update;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_load = 1'b0, intra = 1'b0, frame_done = 1'b0;
  logic [23:0] bpf = 24'd8533;
  logic [7:0]  n = 8'd30, omega = 8'd128;
  logic [3:0]  k = 4'd4;
  logic [31:0] fbits = '0;
  logic signed [31:0] target, v0, lvl;
  longint rv0, rv;
  int checks = 0, failures = 0;

  buffer_size_update dut (.clk, .rst_n, .cfg_load, .bits_per_frame(bpf), .window_n(n),
    .omega_q8(omega), .k_iframe(k), .frame_is_intra(intra), .frame_done, .frame_bits(fbits),
    .target_bits(target), .v0, .buf_level(lvl));
  always #5 clk = ~clk;

  task automatic check_targets();
    longint pt;
    pt = rv + bpf - rv0;
    intra = 1'b0; #1;
    checks++;
    if (target != 32'(pt) || v0 != 32'(rv0) || lvl != 32'(rv)) begin
      failures++; $display("FAIL P target %0d exp %0d (v0 %0d/%0d lvl %0d/%0d)", target, pt, v0, rv0, lvl, rv);
    end
    intra = 1'b1; #1;
    checks++;
    if (target != 32'(pt * k)) begin failures++; $display("FAIL I target %0d exp %0d", target, pt*k); end
    intra = 1'b0; #1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
    rv0 = (longint'(n) * bpf * (256 - omega)) >> 8;
    rv  = rv0;
    check_targets();
    // first target equals B/F
    checks++;
    if (target != 32'(bpf)) begin failures++; $display("FAIL first target %0d", target); end
    for (int f = 0; f < 60; f++) begin
      fbits = 32'(bpf) / 2 + ($urandom % 32'(bpf));
      if (f == 20) fbits = 32'(bpf) * 8;    // a large I frame drains the buffer
      @(negedge clk);
      frame_done = 1'b1;
      @(negedge clk);
      frame_done = 1'b0;
      rv = rv - fbits + bpf;
      check_targets();
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
