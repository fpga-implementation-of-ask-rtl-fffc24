// tb_ask_modulator: self-checking test of the ASK modulator.
//
// Two instances are driven by sampled carriers of one frequency (period
// PERIOD samples): one with A0 = 0 and A1 = 1.0 (on-off keying), one with
// A0 = 0.5 and A1 = 1.75. A message of NBITS bits, each BIT samples long,
// contains both 0->1 and 1->0 changes plus random bits. Checks:
//  * every output sample equals round(A*16*cos(2*pi*n/PERIOD)) for the
//    amplitude of the current bit, worked out here from the formula;
//  * the peak magnitude over each bit equals the amplitude of that bit;
//  * on the first sample after every message change the output already
//    follows the new bit (zero latency).
module tb_ask_modulator;

  localparam int unsigned W      = 6;
  localparam int unsigned FRAC   = 4;
  localparam int unsigned PERIOD = 16;
  localparam int unsigned BIT    = 32;
  localparam int unsigned NBITS  = 40;
  localparam real         TWO_PI = 6.283185307179586;

  localparam real A0_OOK = 0.0,  A1_OOK = 1.0;
  localparam real A0_GEN = 0.5,  A1_GEN = 1.75;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NBITS-1:0] message;
  logic             msg;
  int unsigned      n;       // sample index, counted here independently

  logic signed [W-1:0] c0_ook, c1_ook, out_ook;
  logic signed [W-1:0] c0_gen, c1_gen, out_gen;

  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A0_OOK), .PERIOD(PERIOD)) s0_ook (.clk, .rst, .sample(c0_ook));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A1_OOK), .PERIOD(PERIOD)) s1_ook (.clk, .rst, .sample(c1_ook));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A0_GEN), .PERIOD(PERIOD)) s0_gen (.clk, .rst, .sample(c0_gen));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A1_GEN), .PERIOD(PERIOD)) s1_gen (.clk, .rst, .sample(c1_gen));

  ask_modulator dut_ook (.msg(sk_pkg::symbol_e'(msg)), .carrier0(c0_ook), .carrier1(c1_ook), .ask_out(out_ook));
  ask_modulator #(.W(W)) dut_gen (.msg(sk_pkg::symbol_e'(msg)), .carrier0(c0_gen), .carrier1(c1_gen), .ask_out(out_gen));

  function automatic int expected(real ampl, int unsigned idx);
    real v;
    v = ampl * real'(1 << FRAC) * $cos(TWO_PI * real'(idx % PERIOD) / real'(PERIOD));
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
    int peak_ook, peak_gen, changes;
    message = NBITS'({$urandom, $urandom});
    message[3:0] = 4'b0110;          // guarantees 0->1 and 1->0 changes
    changes = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    #1;  // sample 0 is on the inputs until the next rising edge
    peak_ook = 0;
    peak_gen = 0;
    // One check pass per sample; the bit and the position in it come from n.
    while (n < NBITS * BIT) begin
      int b, s;
      b = int'(n / BIT);
      s = int'(n % BIT);
      check("ASK A0=0",   int'(out_ook), expected(message[b] ? A1_OOK : A0_OOK, n));
      check("ASK A0=0.5", int'(out_gen), expected(message[b] ? A1_GEN : A0_GEN, n));
      if (s == 0 && b > 0 && message[b] != message[b-1]) begin
        changes++;
        // zero latency: the first sample of the new bit uses the new amplitude
        check("latency", iabs(int'(out_gen)), iabs(expected(message[b] ? A1_GEN : A0_GEN, n)));
      end
      if (iabs(int'(out_ook)) > peak_ook) peak_ook = iabs(int'(out_ook));
      if (iabs(int'(out_gen)) > peak_gen) peak_gen = iabs(int'(out_gen));
      if (s == BIT - 1) begin
        check("peak A0=0",   peak_ook, $rtoi((message[b] ? A1_OOK : A0_OOK) * 16.0 + 0.5));
        check("peak A0=0.5", peak_gen, $rtoi((message[b] ? A1_GEN : A0_GEN) * 16.0 + 0.5));
        peak_ook = 0;
        peak_gen = 0;
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
