// ldpc_pkg: constants and parity-check-matrix structure shared by the LDPC
// encoder and the layered min-sum decoder.
//
// The code is the ring-structured code whose 6 x 12 example matrix is
// H = [A | I]: check row m (0-based) joins message columns m-1 (mod K) and m
// and parity column K+m. For K = 6 this is exactly the example matrix; for
// K = 16 it is the 16-message-bit, 32-bit-codeword code used for the encoder
// results (message 16'hb9ab encodes to 32'hb9abcafc). Every row therefore has
// degree 3, every message column degree 2 and every parity column degree 1.
//
// Column numbering used inside the decoder: column n < K is message bit n,
// column K+m is parity bit m. The transmitted word is {message, parity}, so
// column n sits at codeword bit col_bit(K, n).
//
// LLR convention (this design's choice): a positive value favours bit 0.
package ldpc_pkg;

  // Default code size: 16 message bits and 16 parity bits.
  localparam int unsigned K_DEF     = 16;
  // Default soft-value width: the decoder waveforms show 32-bit words.
  localparam int unsigned LLR_W_DEF = 32;
  // Check node degree (ones per row of H).
  localparam int unsigned DC        = 3;
  // Largest variable node degree (ones per column of H).
  localparam int unsigned DV        = 2;
  // The matrix is split into two layers of rows.
  localparam int unsigned NL_DEF    = 2;
  // Two passes over both layers (layer 1, layer 2, layer 1, layer 2).
  localparam int unsigned ITER_DEF  = 2;

  // Column of edge e (0..DC-1) of check row m.
  function automatic int unsigned edge_col(int unsigned k, int unsigned m, int unsigned e);
    case (e)
      0:       return (m + k - 1) % k;
      1:       return m;
      default: return k + m;
    endcase
  endfunction

  // Codeword bit position of decoder column n (codeword = {message, parity}).
  function automatic int unsigned col_bit(int unsigned k, int unsigned n);
    return (n < k) ? k + n : n - k;
  endfunction

  // The rows of column n: slot s (0..DV-1) names check row slot_row, at edge
  // slot_edge of that row. Parity columns use slot 0 only.
  function automatic bit slot_used(int unsigned k, int unsigned n, int unsigned s);
    return (n < k) || (s == 0);
  endfunction

  function automatic int unsigned slot_row(int unsigned k, int unsigned n, int unsigned s);
    if (n < k) return (s == 0) ? n : (n + 1) % k;
    return n - k;
  endfunction

  function automatic int unsigned slot_edge(int unsigned k, int unsigned n, int unsigned s);
    if (n < k) return (s == 0) ? 1 : 0;
    return 2;
  endfunction

endpackage
