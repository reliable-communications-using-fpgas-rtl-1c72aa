// tb_fir_direct -- self-checking testbench for the direct form matched filter.
//
// Two instances: the default one (49 taps, 16-bit alpha = 1.0 SRRC coefficients) and one with
// the 8-bit alpha = 0.25 set. Random ADC samples are applied with random gaps in in_valid. The
// testbench keeps its own history of accepted samples and computes the convolution
// sum_k h[k] x[n-k] itself; every output is compared with it, exactly, one clock after its input
// (the 1-clock latency). A reset in mid-stream must clear the history. Full-scale inputs of both
// signs check that the output never overflows.
module tb_fir_direct;
  import mf_pkg::*;

  localparam int IN_W = 12;
  localparam int OW16 = acc_width(IN_W, 16, TAPS);
  localparam int OW8  = acc_width(IN_W, 8, TAPS);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] in_sample = '0;
  logic out_valid_a, out_valid_b;
  logic signed [OW16-1:0] out_a;
  logic signed [OW8-1:0]  out_b;

  fir_direct dut_a (.clk, .rst_n, .in_valid, .in_sample, .out_valid(out_valid_a), .out_y(out_a));
  fir_direct #(.COEF_W(8), .COEFS(SRRC_A025_C8)) dut_b (
    .clk, .rst_n, .in_valid, .in_sample, .out_valid(out_valid_b), .out_y(out_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [TAPS];        // hist[0] = newest accepted sample
  longint exp_a, exp_b;
  logic   exp_valid;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one cycle of stimulus and check the outputs of the previous one
  task automatic cycle(logic v, logic signed [IN_W-1:0] s);
    @(negedge clk);
    in_valid  = v;
    in_sample = s;
    if (v) begin
      for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(s);
      exp_a = 0; exp_b = 0;
      for (int k = 0; k < TAPS; k++) begin
        exp_a += hist[k] * SRRC_A100_C16[k];
        exp_b += hist[k] * SRRC_A025_C8[k];
      end
    end
    exp_valid = v;
    @(posedge clk);
    #1;
    check(out_valid_a == exp_valid && out_valid_b == exp_valid, "out_valid latency");
    if (exp_valid) begin
      check(longint'(out_a) == exp_a, $sformatf("16b output %0d exp %0d", out_a, exp_a));
      check(longint'(out_b) == exp_b, $sformatf("8b output %0d exp %0d", out_b, exp_b));
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // impulse: the output must replay the coefficient table
    cycle(1, 12'sd1);
    for (int i = 1; i < TAPS + 4; i++) cycle(1, 0);
    // random samples with gaps
    for (int i = 0; i < 3000; i++) cycle(1'(($urandom % 4) != 0), IN_W'($urandom));
    // full scale, worst-case signs
    for (int i = 0; i < 2 * TAPS; i++) cycle(1, (i % 2) ? 12'sh7FF : 12'sh800);
    for (int i = 0; i < 2 * TAPS; i++) cycle(1, 12'sh800);
    // reset in mid-stream clears the delay line
    @(negedge clk) begin rst_n = 0; in_valid = 0; end
    @(posedge clk); #1;
    check(out_valid_a == 0 && out_a == 0, "reset clears output");
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    for (int i = 0; i < 500; i++) cycle(1'(($urandom % 3) != 0), IN_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
