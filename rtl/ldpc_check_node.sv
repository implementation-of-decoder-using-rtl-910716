// ldpc_check_node: min-sum check node (row) update.
//
// For the DC soft values q[] that enter one row of the parity check matrix it
// finds the smallest magnitude (min1, at position idx1) and the second
// smallest (min2), ignoring signs, and the parity (XOR) of all signs. Every
// output takes magnitude min1, except the one at idx1, which takes min2. The
// sign of each output is the total sign parity with the edge's own sign
// removed, so that each output reflects only the other edges of the row.
// This min1/min2 substitution and sign rule follow the decoding procedure;
// it is the plain (unscaled, unoffset) min-sum rule.
//
// Purely combinational. Inputs must lie in -(2^(LLR_W-1)-1) .. 2^(LLR_W-1)-1
// so that every magnitude can be negated again. On equal magnitudes the
// lowest index is taken as min1 (this design's choice).
module ldpc_check_node #(
  parameter int unsigned LLR_W = 32,
  parameter int unsigned DC    = 3
) (
  input  logic signed [LLR_W-1:0] q [DC],
  output logic signed [LLR_W-1:0] r [DC]
);

  logic [LLR_W-1:0]      mag [DC];
  logic [LLR_W-1:0]      min1, min2;
  logic [$clog2(DC)-1:0] idx1;
  logic                  sign_all;

  always_comb begin
    for (int unsigned i = 0; i < DC; i++) begin
      mag[i] = q[i][LLR_W-1] ? LLR_W'(-q[i]) : LLR_W'(q[i]);
    end

    min1     = '1;
    min2     = '1;
    idx1     = '0;
    sign_all = 1'b0;
    for (int unsigned i = 0; i < DC; i++) begin
      sign_all ^= q[i][LLR_W-1];
      if (mag[i] < min1) begin
        min2 = min1;
        min1 = mag[i];
        idx1 = $clog2(DC)'(i);
      end else if (mag[i] < min2) begin
        min2 = mag[i];
      end
    end

    for (int unsigned i = 0; i < DC; i++) begin
      logic [LLR_W-1:0] m;
      m    = (idx1 == $clog2(DC)'(i)) ? min2 : min1;
      r[i] = (sign_all ^ q[i][LLR_W-1]) ? -$signed(m) : $signed(m);
    end
  end

endmodule
