// ldpc_decision: final hard decision of the min-sum decoder.
//
// Each final sum is compared with a threshold: a sum greater than THRESHOLD
// gives bit 0, any other sum gives bit 1. The threshold comparison and its
// polarity follow the decoding procedure; the default threshold of zero and
// the choice that a sum equal to the threshold gives 1 are this design's.
//
// Purely combinational.
module ldpc_decision #(
  parameter int unsigned N         = 32,
  parameter int unsigned LLR_W     = 32,
  parameter int          THRESHOLD = 0
) (
  input  logic signed [LLR_W-1:0] sum [N],
  output logic        [N-1:0]     bits
);

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      bits[n] = !(sum[n] > $signed(LLR_W'(THRESHOLD)));
    end
  end

endmodule
