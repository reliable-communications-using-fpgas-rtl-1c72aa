// tb_decision -- self-checking testbench for the binary PAM decision.
//
// Applies random decision variables plus the edge values 0, +-1 and the extremes, with gaps in
// in_valid, and checks the detected bit (1 for x >= 0) and its 1-clock latency. The bit must hold
// while no new decision arrives.
module tb_decision;
  localparam int X_W = 34;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [X_W-1:0] in_x = '0;
  logic out_valid, out_bit;

  decision #(.X_W(X_W)) dut (.clk, .rst_n, .in_valid, .in_x, .out_valid, .out_bit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic last_bit = 1'b0;

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

  task automatic cycle(logic v, logic signed [X_W-1:0] x);
    @(negedge clk);
    in_valid = v;
    in_x     = x;
    if (v) last_bit = (x >= 0);
    @(posedge clk); #1;
    check(out_valid == v, "out_valid");
    check(out_bit == last_bit, $sformatf("bit for x=%0d", x));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cycle(1, 0);
    cycle(1, -1);
    cycle(0, 5);
    cycle(1, 1);
    cycle(1, {1'b1, {(X_W-1){1'b0}}});
    cycle(1, {1'b0, {(X_W-1){1'b1}}});
    for (int i = 0; i < 1000; i++)
      cycle(1'(($urandom % 4) != 0), (($urandom % 8) == 0) ? '0 : X_W'(signed'({$urandom, $urandom})));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
