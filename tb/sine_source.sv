// sine_source: behavioural model of a sampled sine-wave carrier source.
//
// Not synthesizable logic: it stands for the sine-wave generators that feed
// the modulators' carrier inputs. On each rising clk edge the sample index n
// advances by one (reset to 0 while rst is high), and the output is
//   sample = round(AMPL * 2^FRAC * cos(2*pi*n/PERIOD + PHASE)),
// saturated to the signed W-bit range. PERIOD is the carrier period in
// samples, so the carrier frequency is f_sample / PERIOD.
module sine_source #(
  parameter int unsigned W      = 6,
  parameter int unsigned FRAC   = 4,
  parameter real         AMPL   = 1.0,
  parameter int unsigned PERIOD = 16,
  parameter real         PHASE  = 0.0
) (
  input  logic                clk,
  input  logic                rst,
  output logic signed [W-1:0] sample
);

  localparam real TWO_PI = 6.283185307179586;
  localparam int  MAXV   = (1 << (W - 1)) - 1;
  localparam int  MINV   = -(1 << (W - 1));

  int unsigned n;

  always_ff @(posedge clk) begin
    if (rst) n <= 0;
    else     n <= n + 1;
  end

  always_comb begin
    real v;
    int  q;
    v = AMPL * real'(1 << FRAC) * $cos(TWO_PI * real'(n % PERIOD) / real'(PERIOD) + PHASE);
    q = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (q > MAXV) q = MAXV;
    if (q < MINV) q = MINV;
    sample = W'(q);
  end

endmodule
