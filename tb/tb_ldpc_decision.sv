// tb_ldpc_decision: self-checking test of the threshold decision.
//
// Random sums, including values equal to the threshold, for the default
// threshold of zero and for a threshold of 5: a sum above the threshold must
// give 0, any other sum 1.
module tb_ldpc_decision;
  localparam int N = 32;
  localparam int W = 32;

  logic signed [W-1:0] sum [N];
  logic [N-1:0]        bits0, bits5;

  int checks = 0, failures = 0;

  ldpc_decision #(.N(N), .LLR_W(W))                 dut0 (.sum, .bits(bits0));
  ldpc_decision #(.N(N), .LLR_W(W), .THRESHOLD(5))  dut5 (.sum, .bits(bits5));

  initial begin
    for (int i = 0; i < 300; i++) begin
      int v [N];
      for (int n = 0; n < N; n++) begin
        case ($urandom_range(0, 3))
          0:       v[n] = 0;
          1:       v[n] = 5;
          default: v[n] = $urandom_range(0, 200) - 100;
        endcase
        if (i == 0) v[n] = (n % 2 == 1) ? -(1 << 30) : (1 << 30);
        sum[n] = W'(v[n]);
      end
      #1;
      for (int n = 0; n < N; n++) begin
        bit e0, e5;
        e0 = (v[n] > 0) ? 1'b0 : 1'b1;
        e5 = (v[n] > 5) ? 1'b0 : 1'b1;
        checks += 2;
        if (bits0[n] != e0) begin
          failures++;
          $display("FAIL: sum %0d threshold 0 gave %0d", v[n], bits0[n]);
        end
        if (bits5[n] != e5) begin
          failures++;
          $display("FAIL: sum %0d threshold 5 gave %0d", v[n], bits5[n]);
        end
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
