// tb_fsk_modulator: self-checking test of the FSK modulator.
//
// The modulator is driven by two free-running unit-amplitude carriers, f1 with
// a period of P1 samples (binary 0) and f2 with a period of P2 samples
// (binary 1), and by a message of NBITS bits, each BIT samples long, with both
// 0->1 and 1->0 changes plus random bits. Checks:
//  * every output sample equals round(16*cos(2*pi*n/P)) with P the period of
//    the current bit's frequency, worked out here from the formula;
//  * the number of sign changes inside each bit matches that bit's frequency
//    (2*BIT/P, within one), and the peak magnitude stays at the amplitude;
//  * on the first sample after every message change the output already
//    carries the new frequency (zero latency).
module tb_fsk_modulator;

  localparam int unsigned W      = 6;
  localparam int unsigned FRAC   = 4;
  localparam int unsigned P1     = 16;
  localparam int unsigned P2     = 8;
  localparam int unsigned BIT    = 32;
  localparam int unsigned NBITS  = 40;
  localparam real         AMPL   = 1.0;
  localparam real         TWO_PI = 6.283185307179586;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NBITS-1:0] message;
  logic             msg;
  int unsigned      n;

  logic signed [W-1:0] c_f1, c_f2, out;

  sine_source #(.W(W), .FRAC(FRAC), .AMPL(AMPL), .PERIOD(P1)) s_f1 (.clk, .rst, .sample(c_f1));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(AMPL), .PERIOD(P2)) s_f2 (.clk, .rst, .sample(c_f2));

  fsk_modulator dut (.msg(sk_pkg::symbol_e'(msg)), .carrier0(c_f1), .carrier1(c_f2), .fsk_out(out));

  function automatic int expected(int unsigned period, int unsigned idx);
    real v;
    v = AMPL * real'(1 << FRAC) * $cos(TWO_PI * real'(idx % period) / real'(period));
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at sample %0d: got %0d expected %0d", what, n, got, exp);
    end
  endtask

  assign msg = message[n / BIT];

  always_ff @(posedge clk) begin
    if (rst) n <= 0;
    else     n <= n + 1;
  end

  initial begin
    repeat (NBITS * BIT + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int peak, crossings, changes, nominal;
    logic prev_sign;
    message = NBITS'({$urandom, $urandom});
    message[3:0] = 4'b0110;          // guarantees 0->1 and 1->0 changes
    changes   = 0;
    peak      = 0;
    crossings = 0;
    prev_sign = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    #1;  // sample 0 is on the inputs until the next rising edge
    while (n < NBITS * BIT) begin
      int b, s;
      int unsigned p;
      b = int'(n / BIT);
      s = int'(n % BIT);
      p = message[b] ? P2 : P1;
      check("FSK sample", int'(out), expected(p, n));
      if (s == 0 && b > 0 && message[b] != message[b-1]) begin
        changes++;
        check("latency", int'(out), expected(p, n));
      end
      if (s != 0 && out[W-1] != prev_sign) crossings++;
      prev_sign = out[W-1];
      if (iabs(int'(out)) > peak) peak = iabs(int'(out));
      if (s == BIT - 1) begin
        nominal = int'(2 * BIT / p);
        checks++;
        if (crossings < nominal - 1 || crossings > nominal + 1) begin
          failures++;
          $display("FAIL bit %0d (%0b): %0d sign changes, expected about %0d",
                   b, message[b], crossings, nominal);
        end
        check("peak", peak, $rtoi(AMPL * 16.0 + 0.5));
        peak      = 0;
        crossings = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (changes < 2) begin
      failures++;
      $display("FAIL only %0d message changes seen", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
