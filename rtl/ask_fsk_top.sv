// ask_fsk_top: the ASK modulator and the FSK modulator side by side.
//
// The two modulators are independent designs; they share no signal and each
// has its own message input, its own pair of carrier-sample inputs and its own
// modulated output. Each input and output port stands for one of the model's
// gateways between the sample sources and the hardware. The datapath holds no
// register, so there is no clock: every output follows its inputs within the
// same sample period.
//
// Interface (W-bit samples are signed two's complement):
//   ask_msg, ask_carrier0 (A0 carrier), ask_carrier1 (A1 carrier) -> ask_out
//   fsk_msg, fsk_carrier0 (f1 carrier), fsk_carrier1 (f2 carrier) -> fsk_out
module ask_fsk_top #(
  parameter int unsigned W = sk_pkg::SAMPLE_W
) (
  input  logic                ask_msg,
  input  logic signed [W-1:0] ask_carrier0,
  input  logic signed [W-1:0] ask_carrier1,
  output logic signed [W-1:0] ask_out,

  input  logic                fsk_msg,
  input  logic signed [W-1:0] fsk_carrier0,
  input  logic signed [W-1:0] fsk_carrier1,
  output logic signed [W-1:0] fsk_out
);

  ask_modulator #(.W(W)) u_ask (
    .msg      (sk_pkg::symbol_e'(ask_msg)),
    .carrier0 (ask_carrier0),
    .carrier1 (ask_carrier1),
    .ask_out  (ask_out)
  );

  fsk_modulator #(.W(W)) u_fsk (
    .msg      (sk_pkg::symbol_e'(fsk_msg)),
    .carrier0 (fsk_carrier0),
    .carrier1 (fsk_carrier1),
    .fsk_out  (fsk_out)
  );

endmodule
