// ldpc_top: the digital ends of an LDPC-coded link.
//
// The link is: channel encoder -> modulation -> AWGN channel -> receiver ->
// demodulation -> channel decoder. Only the two LDPC ends are digital logic
// defined here; modulation, the channel, the receiver and demodulation sit
// outside, so the encoder's codeword leaves through enc_* ports and the
// demodulated soft values enter through dec_* ports.
//
// Encoder: K message bits in, {message, parity} out one clock later.
// Decoder: 2K soft values in (index = codeword bit, positive favours 0),
// decoded codeword and message out NL*ITER+2 clocks after the load.
// Both share one clock and one active-low asynchronous reset (this design's
// choice).
module ldpc_top
  import ldpc_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned LLR_W = LLR_W_DEF,
  parameter int unsigned NL    = NL_DEF,
  parameter int unsigned ITER  = ITER_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // transmit side
  input  logic                    enc_in_valid,
  input  logic [K-1:0]            enc_msg,
  output logic                    enc_out_valid,
  output logic [2*K-1:0]          enc_codeword,
  // receive side
  input  logic                    dec_in_valid,
  output logic                    dec_in_ready,
  input  logic signed [LLR_W-1:0] dec_llr [2*K],
  output logic                    dec_out_valid,
  output logic [2*K-1:0]          dec_codeword,
  output logic [K-1:0]            dec_msg
);

  ldpc_encoder #(.K(K)) u_encoder (
    .clk, .rst_n,
    .in_valid  (enc_in_valid),
    .msg       (enc_msg),
    .out_valid (enc_out_valid),
    .codeword  (enc_codeword)
  );

  ldpc_decoder #(.K(K), .LLR_W(LLR_W), .NL(NL), .ITER(ITER)) u_decoder (
    .clk, .rst_n,
    .in_valid     (dec_in_valid),
    .in_ready     (dec_in_ready),
    .llr          (dec_llr),
    .out_valid    (dec_out_valid),
    .out_codeword (dec_codeword),
    .out_msg      (dec_msg)
  );

endmodule
