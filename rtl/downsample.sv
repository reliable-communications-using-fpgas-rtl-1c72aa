// downsample -- keeps one matched-filter output per bit.
//
// The matched filter runs at N samples per bit; only the output taken at the pulse peak,
// x(k*Tb + tau), is a decision variable. A sample counter runs modulo N on in_valid, and the
// sample whose count equals the phase input is passed on. phase is the timing offset in samples
// (the propagation delay tau rounded to a sample); the reference assumes perfect timing and
// supplies it from outside, so this block has no timing recovery.
//
// Interface: in_valid/in_x from the filter; out_valid/out_x one clock later for one sample in N.
// A new phase takes effect on the next input sample. Synchronous active-low reset sets the
// counter to 0, so the first sample after reset has count 0 (this design's choice).
module downsample #(
  parameter int N    = mf_pkg::NSPB,
  parameter int X_W  = 34,
  localparam int PH_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PH_W-1:0]       phase,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] in_x,
  output logic                  out_valid,
  output logic signed [X_W-1:0] out_x
);

  logic [PH_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid && (cnt == phase);
      if (in_valid) begin
        cnt <= (cnt == PH_W'(N-1)) ? '0 : cnt + 1'b1;
        if (cnt == phase) out_x <= in_x;
      end
    end
  end

endmodule
