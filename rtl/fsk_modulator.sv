// fsk_modulator: binary frequency shift keying by selection.
//
// The FSK signal is A*cos(2*pi*f1*t) for binary 0 and A*cos(2*pi*f2*t) for
// binary 1, with the same peak amplitude for both. The two carriers arrive as
// free-running sample streams on carrier0 (f1) and carrier1 (f2); a two-input
// multiplexer (sg_mux) whose select is the message bit passes one of them to
// fsk_out. This structure (input ports, one multiplexer, output port) follows
// the published design. Because both carriers keep running, the output phase
// jumps at a message change unless the sources are phase-aligned there; that
// is a property of the sources, not of this block.
//
// Interface: msg       - message bit (1 selects carrier1)
//            carrier0  - signed W-bit sample of the f1 carrier
//            carrier1  - signed W-bit sample of the f2 carrier
//            fsk_out   - signed W-bit modulated sample
// Timing:    combinational, zero latency.
module fsk_modulator #(
  parameter int unsigned W = sk_pkg::SAMPLE_W
) (
  input  sk_pkg::symbol_e    msg,
  input  logic signed [W-1:0] carrier0,
  input  logic signed [W-1:0] carrier1,
  output logic signed [W-1:0] fsk_out
);

  logic [W-1:0] mux_in [2];
  logic [W-1:0] mux_out;

  assign mux_in[sk_pkg::SYM_ZERO] = carrier0;
  assign mux_in[sk_pkg::SYM_ONE]  = carrier1;

  sg_mux #(.N(2), .W(W)) u_mux (
    .sel (msg),
    .d   (mux_in),
    .y   (mux_out)
  );

  assign fsk_out = signed'(mux_out);

endmodule
