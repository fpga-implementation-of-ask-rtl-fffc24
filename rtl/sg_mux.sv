// sg_mux: multiplexer with one select input and N data inputs of W bits.
//
// This is the block both modulators are built around: the select input picks
// which data input appears on the output. The number of data inputs is a
// parameter, as the design's multiplexer lets its user set it; the modulators
// use two. The mux is combinational (latency 0), matching implementation
// results with no slice registers; output y follows sel and d in the same
// cycle. A select value of N or above, possible only when N is not a power of
// two, returns d[N-1]: this design's choice.
//
// Interface: sel   - select, max(1, clog2(N)) bits, unsigned
//            d     - N data inputs, d[i] chosen when sel == i
//            y     - selected data
module sg_mux #(
  parameter int unsigned N = 2,
  parameter int unsigned W = sk_pkg::SAMPLE_W,
  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     d [N],
  output logic [W-1:0]     y
);

  if (N == (1 << SEL_W)) begin : g_full
    // every select code names an input
    assign y = d[sel];
  end else begin : g_partial
    always_comb begin
      if (sel > SEL_W'(N - 1)) y = d[N-1];
      else                     y = d[sel];
    end
  end

endmodule
