// tb_sg_mux: self-checking test of the multiplexer block.
//
// Three instances are checked with random data and every select value: the
// two-input mux used by the modulators (default parameters), a three-input
// mux, whose unused select code must return the last input, and a
// four-input mux. The expected output is picked from the driven data in the
// testbench. The mux is combinational, so each result is checked one time
// step after its inputs change (zero latency).
module tb_sg_mux;

  localparam int unsigned W = 6;

  int checks   = 0;
  int failures = 0;

  logic [0:0]   sel2;
  logic [W-1:0] d2 [2];
  logic [W-1:0] y2;

  logic [1:0]   sel3;
  logic [W-1:0] d3 [3];
  logic [W-1:0] y3;

  logic [1:0]   sel4;
  logic [W-1:0] d4 [4];
  logic [W-1:0] y4;

  sg_mux dut2 (.sel(sel2), .d(d2), .y(y2));
  sg_mux #(.N(3), .W(W)) dut3 (.sel(sel3), .d(d3), .y(y3));
  sg_mux #(.N(4), .W(W)) dut4 (.sel(sel4), .d(d4), .y(y4));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Watchdog: the test needs well under 100 us.
  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iter = 0; iter < 200; iter++) begin
      foreach (d2[i]) d2[i] = W'($urandom);
      foreach (d3[i]) d3[i] = W'($urandom);
      foreach (d4[i]) d4[i] = W'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel2 = 1'(s);
        sel3 = 2'(s);
        sel4 = 2'(s);
        #1;
        if (s < 2) check("N=2", y2, (s == 0) ? d2[0] : d2[1]);
        check("N=3", y3, (s == 0) ? d3[0] : (s == 1) ? d3[1] : d3[2]);
        case (s)
          0: check("N=4", y4, d4[0]);
          1: check("N=4", y4, d4[1]);
          2: check("N=4", y4, d4[2]);
          default: check("N=4", y4, d4[3]);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
