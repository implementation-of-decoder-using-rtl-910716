// tb_ldpc_check_node: self-checking test of the min-sum check node.
//
// Drives random and hand-picked rows of three soft values and compares each
// output with the extrinsic min-sum value computed directly: the smallest
// magnitude among the other two inputs, negative when an odd number of the
// other two inputs are negative.
module tb_ldpc_check_node;
  localparam int W  = 32;
  localparam int DC = 3;

  logic signed [W-1:0] q [DC];
  logic signed [W-1:0] r [DC];

  int checks = 0, failures = 0;

  ldpc_check_node #(.LLR_W(W), .DC(DC)) dut (.q, .r);

  task automatic apply(int a, int b, int c);
    int v [DC];
    v = '{a, b, c};
    for (int i = 0; i < DC; i++) q[i] = W'(v[i]);
    #1;
    for (int i = 0; i < DC; i++) begin
      longint best = 64'h7fff_ffff_ffff_ffff;
      bit     neg  = 0;
      longint expv;
      for (int j = 0; j < DC; j++) if (j != i) begin
        longint mag = (v[j] < 0) ? -longint'(v[j]) : longint'(v[j]);
        if (mag < best) best = mag;
        neg ^= (v[j] < 0);
      end
      expv = neg ? -best : best;
      checks++;
      if (longint'(r[i]) != expv) begin
        failures++;
        $display("FAIL: q=(%0d,%0d,%0d) r[%0d]=%0d expected %0d", a, b, c, i, r[i], expv);
      end
    end
  endtask

  initial begin
    // worked example: min1 = 1 at edge 1, min2 = 3; parity of signs odd
    apply(-3, 1, 5);
    apply(0, 0, 0);
    apply(-2, -2, 7);
    apply(4, -4, -4);
    apply(100, 200, -300);
    for (int i = 0; i < 3000; i++) begin
      int span;
      span = (i % 3 == 0) ? 8 : (i % 3 == 1) ? 1000 : 1 << 28;
      apply($urandom_range(0, 2 * span) - span,
            $urandom_range(0, 2 * span) - span,
            $urandom_range(0, 2 * span) - span);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
