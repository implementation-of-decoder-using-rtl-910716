// ldpc_encoder: systematic channel encoder for the ring-structured LDPC code.
//
// The codeword is {message, parity}: K message bits followed by K parity
// bits. Parity bit m is the XOR of the message bits joined by check row m of
// H = [A | I], i.e. message bits m and m-1 (mod K). Equivalently
// parity = msg ^ rotate_left(msg, 1). For K = 16 this gives the results the
// design was checked against: 16'hb9ab -> 32'hb9abcafc and
// 16'hb9a8 -> 32'hb9a8caf9.
//
// Interface and timing: msg is sampled when in_valid is high; codeword and
// out_valid appear one clock later (registered outputs, synchronous
// active-low reset). The one-cycle latency and the handshake are this
// design's choice; the code structure follows the parity check matrix.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int unsigned K = K_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [K-1:0]     msg,
  output logic             out_valid,
  output logic [2*K-1:0]   codeword
);

  logic [K-1:0] parity;

  always_comb begin
    for (int unsigned m = 0; m < K; m++) begin
      parity[m] = msg[edge_col(K, m, 0)] ^ msg[edge_col(K, m, 1)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      codeword  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) codeword <= {msg, parity};
    end
  end

endmodule
