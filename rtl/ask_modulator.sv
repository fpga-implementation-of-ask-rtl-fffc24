// ask_modulator: binary amplitude shift keying by selection.
//
// The ASK signal is A0*cos(2*pi*fc*t) for binary 0 and A1*cos(2*pi*fc*t) for
// binary 1 (commonly A0 = 0). Both amplitude-scaled carriers arrive as sample
// streams on carrier0 and carrier1; a two-input multiplexer (sg_mux) whose
// select is the message bit passes one of them to ask_out. Building the
// modulator from input ports, one multiplexer and an output port follows the
// published design; generating the carriers is left to the sources that drive
// the ports.
//
// Interface: msg       - message bit (1 selects carrier1)
//            carrier0  - signed W-bit sample of the A0 carrier
//            carrier1  - signed W-bit sample of the A1 carrier
//            ask_out   - signed W-bit modulated sample
// Timing:    combinational, zero latency: ask_out changes with msg in the same
//            sample period. Both carriers must share one frequency and phase.
module ask_modulator #(
  parameter int unsigned W = sk_pkg::SAMPLE_W
) (
  input  sk_pkg::symbol_e    msg,
  input  logic signed [W-1:0] carrier0,
  input  logic signed [W-1:0] carrier1,
  output logic signed [W-1:0] ask_out
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

  assign ask_out = signed'(mux_out);

endmodule
