// tb_ldpc_variable_node: self-checking test of the column update unit.
//
// Random running sums and old/new messages; checks that the value handed to
// the check nodes is the sum minus the old messages and that the updated sum
// is that value plus the new messages.
module tb_ldpc_variable_node;
  localparam int W  = 32;
  localparam int DV = 2;

  logic signed [W-1:0] sum_in, q_out, sum_out;
  logic signed [W-1:0] r_old [DV];
  logic signed [W-1:0] r_new [DV];

  int checks = 0, failures = 0;

  ldpc_variable_node #(.LLR_W(W), .DV(DV)) dut (.sum_in, .r_old, .r_new, .q_out, .sum_out);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int s, o0, o1, n0, n1;
      s  = $urandom_range(0, 20000) - 10000;
      o0 = $urandom_range(0, 2000) - 1000;
      o1 = (i % 4 == 0) ? 0 : $urandom_range(0, 2000) - 1000;
      n0 = $urandom_range(0, 2000) - 1000;
      n1 = (i % 4 == 0) ? 0 : $urandom_range(0, 2000) - 1000;
      sum_in = W'(s); r_old = '{W'(o0), W'(o1)}; r_new = '{W'(n0), W'(n1)};
      #1;
      checks += 2;
      if (int'(q_out) != s - o0 - o1) begin
        failures++;
        $display("FAIL: q_out %0d expected %0d", q_out, s - o0 - o1);
      end
      if (int'(sum_out) != s - o0 - o1 + n0 + n1) begin
        failures++;
        $display("FAIL: sum_out %0d expected %0d", sum_out, s - o0 - o1 + n0 + n1);
      end
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
