// tb_downsample -- self-checking testbench for the bit-rate downsampler.
//
// Feeds a numbered sample stream (value = input index) with random gaps in in_valid, for every
// phase 0 .. N-1, and checks that exactly the inputs whose index is congruent to the phase modulo
// N come out, in order, one clock after they went in. A phase change and a reset in mid-stream
// are also covered.
module tb_downsample;
  localparam int N = 4;
  localparam int X_W = 20;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] phase = '0;
  logic signed [X_W-1:0] in_x = '0;
  logic out_valid;
  logic signed [X_W-1:0] out_x;

  downsample #(.N(N), .X_W(X_W)) dut (.clk, .rst_n, .phase, .in_valid, .in_x, .out_valid, .out_x);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int idx;          // index of the next input since reset
  int n_out;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(logic v);
    logic exp_v;
    int   exp_x;
    @(negedge clk);
    in_valid = v;
    in_x     = X_W'(idx);
    exp_v    = v && ((idx % N) == int'(phase));
    exp_x    = idx;
    if (v) idx++;
    @(posedge clk); #1;
    check(out_valid == exp_v, "out_valid");
    if (exp_v) begin
      check(int'(out_x) == exp_x, $sformatf("out_x %0d exp %0d", out_x, exp_x));
      n_out++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int p = 0; p < N; p++) begin
      @(negedge clk) begin rst_n = 0; phase = 2'(p); in_valid = 0; end
      @(negedge clk) rst_n = 1;
      idx = 0; n_out = 0;
      for (int i = 0; i < 400; i++) cycle(1'(($urandom % 3) != 0));
      check(n_out == (idx - p + N - 1) / N, $sformatf("phase %0d count %0d of %0d", p, n_out, idx));
    end
    // change phase without reset: counter keeps running
    phase = 2'd3;
    for (int i = 0; i < 100; i++) cycle(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
