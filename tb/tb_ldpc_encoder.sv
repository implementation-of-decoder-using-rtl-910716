// tb_ldpc_encoder: self-checking test of the systematic LDPC encoder.
//
// Checks the two encodings of the published results (16'hb9ab ->
// 32'hb9abcafc, 16'hb9a8 -> 32'hb9a8caf9), random messages against the
// reference encoder, that every codeword satisfies the parity check matrix,
// the one-clock latency, and a K = 6 instance against the 6 x 12 example
// matrix written out row by row.
module tb_ldpc_encoder;
  import ldpc_ref_pkg::*;

  localparam int K = 16;

  logic          clk = 0;
  logic          rst_n = 0;
  logic          in_valid = 0;
  logic [K-1:0]  msg = '0;
  logic          out_valid;
  logic [2*K-1:0] codeword;

  logic          in_valid6 = 0;
  logic [5:0]    msg6 = '0;
  logic          out_valid6;
  logic [11:0]   codeword6;

  int checks = 0, failures = 0;

  ldpc_encoder #(.K(K)) dut (.clk, .rst_n, .in_valid, .msg, .out_valid, .codeword);
  ldpc_encoder #(.K(6)) dut6 (.clk, .rst_n, .in_valid(in_valid6), .msg(msg6),
                              .out_valid(out_valid6), .codeword(codeword6));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // The 6 x 12 example matrix, columns V1..V12 left to right.
  localparam bit [11:0] H6 [6] = '{
    12'b1000_0110_0000,
    12'b1100_0001_0000,
    12'b0110_0000_1000,
    12'b0011_0000_0100,
    12'b0001_1000_0010,
    12'b0000_1100_0001
  };

  task automatic encode16(logic [K-1:0] m, logic [2*K-1:0] expect_cw);
    @(negedge clk);
    msg = m; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "out_valid one clock after in_valid");
    check(codeword == expect_cw,
          $sformatf("msg %h -> %h, expected %h", m, codeword, expect_cw));
    check(syndrome_weight(K, MAXN'(codeword)) == 0, "codeword satisfies H");
    @(negedge clk);
    check(!out_valid, "out_valid is a single pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    encode16(16'hb9ab, 32'hb9abcafc);
    encode16(16'hb9a8, 32'hb9a8caf9);
    for (int i = 0; i < 200; i++) begin
      logic [K-1:0]    m;
      logic [MAXN-1:0] ref_cw;
      m      = K'($urandom);
      ref_cw = encode(K, MAXK'(m));
      encode16(m, ref_cw[2*K-1:0]);
    end
    // K = 6: all 64 messages against the written-out example matrix.
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      msg6 = 6'(v); in_valid6 = 1;
      @(negedge clk);
      in_valid6 = 0;
      check(codeword6[11:6] == 6'(v), "K=6 systematic part");
      for (int r = 0; r < 6; r++) begin
        bit s;
        s = 0;
        // V(j+1) is message bit j for j < 6, parity bit j-6 otherwise.
        for (int j = 0; j < 12; j++)
          if (H6[r][11 - j]) s ^= (j < 6) ? codeword6[6 + j] : codeword6[j - 6];
        check(s == 0, $sformatf("K=6 msg %0d row C%0d parity", v, r + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
