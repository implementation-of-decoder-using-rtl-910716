// tb_ldpc_layer_ctrl: self-checking test of the decoder sequencer.
//
// Starts several decodes (with the default two layers and two iterations,
// and with three layers and one iteration) and checks, cycle by cycle, that
// load comes with the start pulse, that the layers run in order
// 0,1,0,1 (or 0,1,2), that decide follows the last layer after
// NL*ITER+1 cycles, that start is ignored while busy, and that ready
// returns afterwards.
module tb_ldpc_layer_ctrl;
  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;

  logic       ready_a, load_a, run_a, decide_a;
  logic [1:0] layer_a, iter_a;
  logic       ready_b, load_b, run_b, decide_b;
  logic [1:0] layer_b;
  logic [0:0] iter_b;

  int checks = 0, failures = 0;

  ldpc_layer_ctrl #(.NL(2), .ITER(2)) dut_a (
    .clk, .rst_n, .start(start_a), .ready(ready_a), .load(load_a), .run(run_a),
    .layer(layer_a), .iter(iter_a), .decide(decide_a));
  ldpc_layer_ctrl #(.NL(3), .ITER(1)) dut_b (
    .clk, .rst_n, .start(start_b), .ready(ready_b), .load(load_b), .run(run_b),
    .layer(layer_b), .iter(iter_b), .decide(decide_b));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      check(ready_a && !run_a && !decide_a, "A idle before start");
      start_a = 1;
      #1 check(load_a, "A load with start");
      @(negedge clk);
      start_a = 1;   // held high: must be ignored while busy
      for (int c = 0; c < 4; c++) begin
        check(run_a && !ready_a && !load_a, $sformatf("A run in cycle %0d", c + 1));
        check(layer_a == 2'(c % 2), $sformatf("A layer %0d in cycle %0d", layer_a, c + 1));
        check(iter_a == 2'(c / 2), $sformatf("A iteration %0d in cycle %0d", iter_a, c + 1));
        @(negedge clk);
      end
      start_a = 0;
      check(decide_a && !run_a, "A decide after NL*ITER run cycles");
      @(negedge clk);
      check(ready_a && !decide_a, "A ready again");
      @(negedge clk);
    end

    start_b = 1;
    @(negedge clk);
    start_b = 0;
    for (int c = 0; c < 3; c++) begin
      check(run_b && layer_b == 2'(c), $sformatf("B layer %0d in cycle %0d", layer_b, c + 1));
      @(negedge clk);
    end
    check(decide_b, "B decide");
    @(negedge clk);
    check(ready_b, "B ready again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
