// decision -- binary PAM symbol decision.
//
// With perfect timing the decision variable is x(kTb + tau) = a(k) + v(kTb) with a(k) in
// {-1, +1}, so the maximum-likelihood decision is its sign. The detected bit is 1 for a(k) = +1
// (x >= 0) and 0 for a(k) = -1 (x < 0), i.e. the inverted sign bit (MSB) of the filter output;
// the mapping of +1 to bit 1 and of x = 0 to +1 are this design's choices.
//
// Interface: in_valid/in_x, one decision variable per bit; out_valid/out_bit one clock later.
// Synchronous active-low reset.
module decision #(
  parameter int X_W = 34
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] in_x,
  output logic                  out_valid,
  output logic                  out_bit
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= ~in_x[X_W-1];
    end
  end

endmodule
