// ldpc_decoder: layered min-sum decoder for the ring-structured LDPC code.
//
// Algorithm. The check rows are split into NL layers of K/NL consecutive rows
// (default: two layers, rows 1-8 and 9-16). Each column keeps a running sum,
// initialised with its received soft value; the check messages ("layer
// values") start at zero. Processing a layer: every column subtracts the
// messages this layer stored last time, the layer's rows run the min-sum
// rule on those values, and every column adds the new messages back. After
// ITER passes over all layers each sum is thresholded into a bit. With the
// defaults this is the sequence sum_1 .. sum_6 of the procedure: layer 1 on
// the received values, layer 2, layer 1 again, layer 2 again, decision.
//
// Structure. K/NL check node units are shared by the layers (unit j serves
// row layer*K/NL + j); one variable node unit per column. The sums live in
// N = 2K registers and the messages in a K x 3 register array (one entry per
// one of H). One layer is processed per clock.
//
// Interface and timing. llr[i] is the soft value of codeword bit i, in the
// same {message, parity} order the encoder produces; positive means 0. When
// in_ready is high, in_valid loads llr. out_valid rises NL*ITER+2 clocks
// after the load and stays high for one clock; out_codeword and out_msg hold
// the result until the next decode ends. The decoded bits follow the
// procedure's threshold rule. The handshake, the register organisation and
// one-layer-per-clock scheduling are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned K         = K_DEF,
  parameter int unsigned LLR_W     = LLR_W_DEF,
  parameter int unsigned NL        = NL_DEF,
  parameter int unsigned ITER      = ITER_DEF,
  parameter int          THRESHOLD = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [LLR_W-1:0] llr [2*K],
  output logic                    out_valid,
  output logic [2*K-1:0]          out_codeword,
  output logic [K-1:0]            out_msg
);

  localparam int unsigned N   = 2 * K;
  localparam int unsigned RPL = K / NL;   // rows per layer

  typedef logic signed [LLR_W-1:0] llr_t;

  // Controller
  logic                      load, run, decide;
  logic [$clog2(NL+1)-1:0]   layer;
  logic [$clog2(ITER+1)-1:0] iter;

  ldpc_layer_ctrl #(.NL(NL), .ITER(ITER)) u_ctrl (
    .clk, .rst_n,
    .start (in_valid),
    .ready (in_ready),
    .load, .run, .layer, .iter, .decide
  );

  // State: column sums and stored check messages (layer values).
  llr_t sum_q [N];
  llr_t rmem  [K][DC];

  // Which rows belong to the layer being processed.
  logic [K-1:0] row_active;
  always_comb begin
    for (int unsigned m = 0; m < K; m++) row_active[m] = (m / RPL) == int'(layer);
  end

  // Variable node units, first half: value handed to the check nodes.
  llr_t q_col   [N];
  llr_t sum_nxt [N];
  llr_t cn_q    [RPL][DC];
  llr_t cn_r    [RPL][DC];

  for (genvar n = 0; n < N; n++) begin : g_vn
    llr_t r_old [DV];
    llr_t r_new [DV];
    for (genvar s = 0; s < DV; s++) begin : g_slot
      if (slot_used(K, n, s)) begin : g_used
        localparam int unsigned ROW  = slot_row(K, n, s);
        localparam int unsigned EDGE = slot_edge(K, n, s);
        assign r_old[s] = row_active[ROW] ? rmem[ROW][EDGE]          : '0;
        assign r_new[s] = row_active[ROW] ? cn_r[ROW % RPL][EDGE]    : '0;
      end else begin : g_unused
        assign r_old[s] = '0;
        assign r_new[s] = '0;
      end
    end
    ldpc_variable_node #(.LLR_W(LLR_W), .DV(DV)) u_vn (
      .sum_in  (sum_q[n]),
      .r_old   (r_old),
      .r_new   (r_new),
      .q_out   (q_col[n]),
      .sum_out (sum_nxt[n])
    );
  end

  // Check node units, shared by the layers.
  for (genvar j = 0; j < RPL; j++) begin : g_cn
    always_comb begin
      for (int unsigned e = 0; e < DC; e++) begin
        cn_q[j][e] = '0;
        for (int unsigned l = 0; l < NL; l++) begin
          if (int'(layer) == l) cn_q[j][e] = q_col[edge_col(K, l * RPL + j, e)];
        end
      end
    end
    ldpc_check_node #(.LLR_W(LLR_W), .DC(DC)) u_cn (
      .q (cn_q[j]),
      .r (cn_r[j])
    );
  end

  // Final decision on the column sums.
  logic [N-1:0] col_bits;
  ldpc_decision #(.N(N), .LLR_W(LLR_W), .THRESHOLD(THRESHOLD)) u_dec (
    .sum  (sum_q),
    .bits (col_bits)
  );

  // Registers: initialisation, layer update, output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) sum_q[n] <= '0;
      for (int unsigned m = 0; m < K; m++)
        for (int unsigned e = 0; e < DC; e++) rmem[m][e] <= '0;
      out_valid    <= 1'b0;
      out_codeword <= '0;
      out_msg      <= '0;
    end else begin
      out_valid <= decide;
      if (load) begin
        for (int unsigned n = 0; n < N; n++) sum_q[n] <= llr[col_bit(K, n)];
        for (int unsigned m = 0; m < K; m++)
          for (int unsigned e = 0; e < DC; e++) rmem[m][e] <= '0;
      end else if (run) begin
        for (int unsigned n = 0; n < N; n++) sum_q[n] <= sum_nxt[n];
        for (int unsigned m = 0; m < K; m++)
          if (row_active[m])
            for (int unsigned e = 0; e < DC; e++) rmem[m][e] <= cn_r[m % RPL][e];
      end
      if (decide) begin
        for (int unsigned n = 0; n < N; n++) out_codeword[col_bit(K, n)] <= col_bits[n];
        out_msg <= col_bits[K-1:0];
      end
    end
  end

  // iter is informational for the controller only.
  logic unused_iter;
  assign unused_iter = ^iter;

  // K must split evenly into layers.
  initial assert (K % NL == 0) else $error("K must be a multiple of NL");

endmodule
