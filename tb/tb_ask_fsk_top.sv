// tb_ask_fsk_top: end-to-end test of the two modulators side by side.
//
// The top is instantiated with its default parameters (6-bit samples). The
// ASK half gets one carrier frequency at amplitudes A0 = 0 and A1 = 1.0; the
// FSK half gets unit-amplitude carriers f1 (period P1) and f2 (period P2).
// Two independent random messages, one per half, each BIT samples per bit,
// drive the halves at the same time, so each half is also checked for not
// being disturbed by the other. Every output sample is compared with the
// cosine formula for the current bit, worked out here.
//
// Mechanisms counted, each of which must occur at least once: ASK carrier
// switched on (0->1), ASK carrier switched off (1->0), FSK shift f1->f2 and
// FSK shift f2->f1; on the first sample after each, the output must already
// follow the new bit (zero latency).
module tb_ask_fsk_top;

  localparam int unsigned W      = sk_pkg::SAMPLE_W;
  localparam int unsigned FRAC   = sk_pkg::SAMPLE_FRAC;
  localparam int unsigned PC     = 16;   // ASK carrier period, samples
  localparam int unsigned P1     = 16;   // FSK f1 period
  localparam int unsigned P2     = 8;    // FSK f2 period
  localparam int unsigned BIT    = 32;
  localparam int unsigned NBITS  = 64;
  localparam real         A0     = 0.0;
  localparam real         A1     = 1.0;
  localparam real         TWO_PI = 6.283185307179586;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NBITS-1:0] ask_message, fsk_message;
  int unsigned      n;

  logic                ask_msg, fsk_msg;
  logic signed [W-1:0] ask_c0, ask_c1, ask_out;
  logic signed [W-1:0] fsk_c0, fsk_c1, fsk_out;

  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A0),  .PERIOD(PC)) s_ask0 (.clk, .rst, .sample(ask_c0));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(A1),  .PERIOD(PC)) s_ask1 (.clk, .rst, .sample(ask_c1));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(1.0), .PERIOD(P1)) s_fsk0 (.clk, .rst, .sample(fsk_c0));
  sine_source #(.W(W), .FRAC(FRAC), .AMPL(1.0), .PERIOD(P2)) s_fsk1 (.clk, .rst, .sample(fsk_c1));

  ask_fsk_top dut (
    .ask_msg      (ask_msg),
    .ask_carrier0 (ask_c0),
    .ask_carrier1 (ask_c1),
    .ask_out      (ask_out),
    .fsk_msg      (fsk_msg),
    .fsk_carrier0 (fsk_c0),
    .fsk_carrier1 (fsk_c1),
    .fsk_out      (fsk_out)
  );

  function automatic int expected(real ampl, int unsigned period, int unsigned idx);
    real v;
    v = ampl * real'(1 << FRAC) * $cos(TWO_PI * real'(idx % period) / real'(period));
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at sample %0d: got %0d expected %0d", what, n, got, exp);
    end
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  assign ask_msg = ask_message[n / BIT];
  assign fsk_msg = fsk_message[n / BIT];

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
    int ask_on, ask_off, fsk_up, fsk_down;
    ask_message = NBITS'({$urandom, $urandom});
    fsk_message = NBITS'({$urandom, $urandom});
    ask_message[3:0] = 4'b0110;
    fsk_message[3:0] = 4'b1001;
    ask_on = 0; ask_off = 0; fsk_up = 0; fsk_down = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    #1;  // sample 0 is on the inputs until the next rising edge
    while (n < NBITS * BIT) begin
      int b, s;
      real a;
      int unsigned p;
      b = int'(n / BIT);
      s = int'(n % BIT);
      a = ask_message[b] ? A1 : A0;
      p = fsk_message[b] ? P2 : P1;
      check("ASK", int'(ask_out), expected(a, PC, n));
      check("FSK", int'(fsk_out), expected(1.0, p, n));
      if (s == 0 && b > 0) begin
        if (ask_message[b] && !ask_message[b-1]) ask_on++;
        if (!ask_message[b] && ask_message[b-1]) ask_off++;
        if (fsk_message[b] && !fsk_message[b-1]) fsk_up++;
        if (!fsk_message[b] && fsk_message[b-1]) fsk_down++;
      end
      @(negedge clk);
    end
    require("ASK carrier on (0->1)",  ask_on);
    require("ASK carrier off (1->0)", ask_off);
    require("FSK shift f1->f2",       fsk_up);
    require("FSK shift f2->f1",       fsk_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
