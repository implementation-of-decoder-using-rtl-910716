// ldpc_variable_node: column (variable node) update of the layered decoder.
//
// Each column keeps one running sum: the received value plus every check
// message currently stored for the column. When a layer is processed, the
// messages this layer stored on its previous pass (r_old) are subtracted to
// give the value handed to the layer's check nodes (q_out). The layer's new
// messages (r_new) are then added back to give the updated sum (sum_out).
// Slots that do not belong to the current layer are driven with zero by the
// caller, so the same unit serves every layer and every column.
//
// The add-back and subtract-old steps follow the layered decoding procedure.
// Purely combinational; the caller registers sum_out. Plain two's-complement
// arithmetic without saturation (this design's choice).
module ldpc_variable_node #(
  parameter int unsigned LLR_W = 32,
  parameter int unsigned DV    = 2
) (
  input  logic signed [LLR_W-1:0] sum_in,
  input  logic signed [LLR_W-1:0] r_old [DV],
  input  logic signed [LLR_W-1:0] r_new [DV],
  output logic signed [LLR_W-1:0] q_out,
  output logic signed [LLR_W-1:0] sum_out
);

  always_comb begin
    q_out = sum_in;
    for (int unsigned s = 0; s < DV; s++) q_out -= r_old[s];
    sum_out = q_out;
    for (int unsigned s = 0; s < DV; s++) sum_out += r_new[s];
  end

endmodule
